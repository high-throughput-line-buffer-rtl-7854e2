// tb_dswim_rd_logic: random line-buffer read data and placement; three
// cycles later the window must hold, in row r < H-1, pixel i taken from LB
// (lb+1+r) mod H at BRAM (start + (off+i)/8) mod NBRAM, byte (off+i) mod 8,
// and the delayed input block in row H-1.
module tb_dswim_rd_logic;
  import dswim_pkg::*;
  localparam int H = 3, NBLK = 16, NBRAM = 3, TAG_W = 8, LAT = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic [1:0] in_lb = 0, in_start = 0;
  logic [2:0] in_offset = 0;
  logic [NBLK-1:0][7:0] in_blk = '0;
  logic [TAG_W-1:0] in_tag = 0, out_tag;
  logic [H-1:0][NBRAM-1:0][63:0] rd_data = '0;
  logic [H-1:0][NBLK-1:0][7:0] out_win;
  dswim_rd_logic #(.H(H), .NBLK(NBLK), .NBRAM(NBRAM), .TAG_W(TAG_W)) dut (.*);

  typedef struct {
    bit v; int lb, s, off, tag;
    logic [NBLK-1:0][7:0] blk;
    logic [H-1:0][NBRAM-1:0][63:0] rd;
  } stim_t;
  stim_t hist[$];
  int checks = 0, failures = 0;
  bit done = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  always @(negedge clk) if (rst_n && !done && hist.size() > LAT) begin
    stim_t e;
    e = hist[hist.size() - 1 - LAT];
    chk(out_valid == e.v, $sformatf("valid %0d %0d n=%0d", out_valid, e.v, hist.size()));
    if (e.v) begin
      chk(out_tag == TAG_W'(e.tag), $sformatf("tag got %0d exp %0d idx %0d t=%0t", out_tag, e.tag, hist.size(), $time));
      chk(out_win[H-1] == e.blk, "bottom row");
      for (int r = 0; r < H - 1; r++)
        for (int i = 0; i < NBLK; i++) begin
          int src, q, b;
          src = (e.lb + 1 + r) % H;
          q = e.off + i;
          b = (e.s + q / 8) % NBRAM;
          chk(out_win[r][i] == e.rd[src][b][8 * (q % 8) +: 8],
              $sformatf("row %0d pixel %0d", r, i));
        end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      stim_t e;
      @(posedge clk); #1;
      e.v = $urandom_range(3) != 0;
      e.lb = $urandom_range(H - 1);
      e.s = $urandom_range(NBRAM - 1);
      e.off = $urandom_range(7);
      e.tag = $urandom_range(255);
      for (int i = 0; i < NBLK; i++) e.blk[i] = 8'($urandom);
      for (int l = 0; l < H; l++)
        for (int b = 0; b < NBRAM; b++) e.rd[l][b] = {$urandom, $urandom};
      in_valid = e.v; in_lb = 2'(e.lb); in_start = 2'(e.s); in_offset = 3'(e.off);
      in_tag = TAG_W'(e.tag); in_blk = e.blk; rd_data = e.rd;
      hist.push_back(e);
    end
    done = 1;
    repeat (5) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
