// tb_dswim_wr_logic: drives random blocks with random placement (start
// BRAM, in-word offset, last-block flag, carried-pixel count, target LB)
// and checks, three cycles later, the write data, byte masks, enables and
// counter controls of every line buffer against the placement rule: block
// pixel i goes to padded position off+i, whose BRAM slot (off+i)/8 is moved
// to BRAM (start + (off+i)/8) mod NBRAM; the last `remain` pixels of a last
// block go to positions 0.. of the next LB.
module tb_dswim_wr_logic;
  import dswim_pkg::*;
  localparam int H = 3, NBLK = 16, NBRAM = 3, TAG_W = 8, LAT = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, in_valid = 0, in_last = 0;
  logic [NBLK-1:0][7:0] in_blk = '0, wr_blk;
  logic [1:0] in_start = 0, in_lb = 0, wr_lb, wr_start;
  logic [2:0] in_offset = 0, wr_offset;
  logic [3:0] in_remain = 0;
  logic [TAG_W-1:0] in_tag = 0, wr_tag;
  logic [H-1:0][NBRAM-1:0][63:0] wr_data;
  logic [H-1:0][NBRAM-1:0][7:0]  wr_mask;
  logic [H-1:0][NBRAM-1:0]       wr_en, addr_inc, addr_rst;
  logic wr_valid;
  dswim_wr_logic #(.H(H), .NBLK(NBLK), .NBRAM(NBRAM), .TAG_W(TAG_W)) dut (.*);

  typedef struct {
    bit v; bit last; int s, off, rem, lb, tag;
    logic [NBLK-1:0][7:0] blk;
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
    logic [H-1:0][NBRAM-1:0][63:0] xd;
    logic [H-1:0][NBRAM-1:0][7:0]  xm;
    int nx;
    e = hist[hist.size() - 1 - LAT];
    xd = '0; xm = '0;
    if (e.v) begin
      for (int i = 0; i < NBLK; i++) begin
        int q, b;
        q = e.off + i;
        b = (e.s + q / 8) % NBRAM;
        xd[e.lb][b][8 * (q % 8) +: 8] = e.blk[i];
        xm[e.lb][b][q % 8] = 1'b1;
      end
      nx = (e.lb + 1) % H;
      if (e.last)
        for (int i = 0; i < e.rem; i++) begin
          xd[nx][i / 8][8 * (i % 8) +: 8] = e.blk[NBLK - e.rem + i];
          xm[nx][i / 8][i % 8] = 1'b1;
        end
    end
    chk(wr_valid == e.v, "valid");
    for (int l = 0; l < H; l++)
      for (int b = 0; b < NBRAM; b++) begin
        if (e.v) chk(wr_mask[l][b] == xm[l][b], $sformatf("mask lb%0d bram%0d", l, b));
        for (int k = 0; k < 8; k++)
          if (xm[l][b][k]) chk(wr_data[l][b][8*k +: 8] == xd[l][b][8*k +: 8], "data");
        chk(wr_en[l][b] == (|xm[l][b]), "wr_en");
        chk(addr_inc[l][b] == xm[l][b][7], "addr_inc");
        chk(addr_rst[l][b] == (e.v && e.last && l == e.lb), "addr_rst");
      end
    if (e.v) begin
      chk(wr_lb == 2'(e.lb) && wr_start == 2'(e.s) && wr_offset == 3'(e.off), "context");
      chk(wr_blk == e.blk && wr_tag == TAG_W'(e.tag), "block and tag");
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      stim_t e;
      @(posedge clk); #1;
      e.v = $urandom_range(4) != 0;
      e.last = $urandom_range(2) == 0;
      e.s = $urandom_range(NBRAM - 1);
      e.off = $urandom_range(7);
      e.rem = e.last ? $urandom_range(NBLK - 1) : 0;
      e.lb = $urandom_range(H - 1);
      e.tag = $urandom_range(255);
      for (int i = 0; i < NBLK; i++) e.blk[i] = 8'($urandom);
      in_valid = e.v; in_last = e.last; in_start = 2'(e.s); in_offset = 3'(e.off);
      in_remain = 4'(e.last ? e.rem : $urandom_range(15)); in_lb = 2'(e.lb);
      in_tag = TAG_W'(e.tag); in_blk = e.blk;
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
