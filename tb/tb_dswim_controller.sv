// tb_dswim_controller: runs the controller alone on the worked example of a
// 44-pixel-wide image with 16-pixel blocks and 3 line buffers (instruction
// list (0,0,4,3,0) (0,4,8,3,0) (1,0,12,3,0) (1,4,0,2,1), repeated). For the
// first 16 blocks it checks which LB each block is written to (blocks 0-2
// LB0, 3-5 LB1, 6-8 LB2, 9-10 LB0, 11-13 LB1, 14-15 LB2), the exact BRAM
// bytes it enables (linear positions R+16k.. of the line, R = 0,4,8,12),
// the carried pixels written to the next LB, the address-select output, the
// counter resets at line ends, the side-band of the output window 7 cycles
// later, and that the controller stops accepting after N_height lines.
module tb_dswim_controller;
  import dswim_pkg::*;
  import dswim_tb_pkg::*;
  localparam int H = 3, NBLK = 16, NLINE_MAX = 4096, NBRAM = 3, LAT = 7, HEIGHT = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we = 0, in_valid = 0, in_ready, out_valid, out_last;
  logic [15:0] cfg_height = 0, out_line, out_x;
  logic [3:0] instr_addr;
  logic [31:0] instr_data;
  logic [NBLK-1:0][7:0] in_blk = '0;
  logic [H-1:0][NBRAM-1:0][63:0] wr_data, rd_data = '0;
  logic [H-1:0][NBRAM-1:0][7:0] wr_mask;
  logic [H-1:0][NBRAM-1:0] wr_en, addr_inc, addr_rst;
  logic [1:0] addr_sel;
  logic [H-1:0][NBLK-1:0][7:0] out_win;
  dswim_controller #(.H(H), .NBLK(NBLK), .NLINE_MAX(NLINE_MAX)) dut (.*);

  // instruction ROM for the example, read combinationally like instr_mem
  logic [31:0] rom [16];
  assign instr_data = rom[instr_addr];

  localparam int LB_OF_BLK [16] = '{0,0,0, 1,1,1, 2,2,2, 0,0, 1,1,1, 2,2};
  localparam int R_OF_LINE [4]  = '{0, 4, 8, 12};
  localparam int CYC_OF_LINE [4] = '{3, 3, 3, 2};

  int checks = 0, failures = 0, cyc = 0;
  int blk_line[$], blk_k[$], acc_t[$];
  always @(posedge clk) cyc++;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s (cycle %0d)", s, cyc); end
  endtask

  // write-side checker: the write of a block appears 3 cycles after acceptance
  int wr_idx = 0;
  always @(negedge clk) if (rst_n && (|wr_en)) begin
    int y, k, r, lb, last;
    logic [H-1:0][NBRAM-1:0][7:0] xm;
    y = blk_line[wr_idx]; k = blk_k[wr_idx];
    r = R_OF_LINE[y % 4]; lb = y % H;
    last = (k == CYC_OF_LINE[y % 4] - 1);
    if (wr_idx < 16) chk(lb == LB_OF_BLK[wr_idx], "LB of block (worked example)");
    xm = '0;
    for (int i = 0; i < NBLK; i++) begin
      int p;
      p = r + NBLK * k + i;
      xm[lb][(p / 8) % NBRAM][p % 8] = 1'b1;
    end
    if (last) begin
      int rn;
      rn = R_OF_LINE[(y + 1) % 4];
      for (int i = 0; i < rn; i++) xm[(lb + 1) % H][i / 8][i % 8] = 1'b1;
    end
    chk(wr_mask == xm, $sformatf("byte enables of block %0d", wr_idx));
    chk(addr_sel == 2'(lb), "address select");
    for (int l = 0; l < H; l++) chk(addr_rst[l] == ((last && l == lb) ? '1 : '0), "counter reset");
    wr_idx++;
  end

  // output side-band checker
  int out_idx = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    int y, k;
    y = blk_line[out_idx]; k = blk_k[out_idx];
    chk(cyc - acc_t[out_idx] == LAT, "latency");
    chk(out_line == 16'(y), "out_line");
    chk(out_x == 16'(R_OF_LINE[y % 4] + NBLK * k), "out_x");
    chk(out_last == (k == CYC_OF_LINE[y % 4] - 1), "out_last");
    out_idx++;
  end

  initial begin
    instr_q_t q;
    q = gen_instr(44, NBLK);
    foreach (rom[i]) rom[i] = '0;
    foreach (q[i]) rom[i] = encode_instr(q[i], start_w(NBRAM), offset_w(), remain_w(NBLK),
                                         cycle_w(NLINE_MAX, NBLK));
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(in_ready == 0, "idle before arming");
    cfg_we = 1; cfg_height = 16'(HEIGHT);
    @(negedge clk);
    cfg_we = 0;
    for (int y = 0; y < HEIGHT; y++)
      for (int k = 0; k < CYC_OF_LINE[y % 4]; k++) begin
        if ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1;
        for (int i = 0; i < NBLK; i++) in_blk[i] = 8'($urandom);
        chk(in_ready == 1, "ready during image");
        blk_line.push_back(y); blk_k.push_back(k); acc_t.push_back(cyc + 1);
        @(negedge clk);
      end
    in_valid = 0;
    chk(in_ready == 0, "stops after N_height lines");
    repeat (LAT + 2) @(negedge clk);
    chk(out_idx == blk_line.size() && wr_idx == blk_line.size(), "all blocks seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
