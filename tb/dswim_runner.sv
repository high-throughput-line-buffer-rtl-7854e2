// dswim_runner: drives one D-SWIM buffer instance through one image and
// checks every window it produces. Used by the workload testbench to run
// several buffer configurations (H, N_blk) side by side.
//
// On `start` it loads the instruction list for width W (one instruction per
// cycle, counted as the programming time), writes the height HT, then
// streams the W x HT image of random pixels as ceil(W*HT/N_blk) blocks with
// no gaps (counted as the computation time, which must equal the block
// count). Every output window is compared with the image: bottom row,
// upper rows inside the block's own line, and upper-row pixels of line-end
// blocks that belong to the next line where the older lines carried at
// least as many pixels. Latency must be 7 cycles. `done` rises when the
// image has been drained; checks and failures are outputs.
module dswim_runner
  import dswim_pkg::*;
  import dswim_tb_pkg::*;
#(
  parameter int unsigned H         = 3,
  parameter int unsigned NBLK      = 16,
  parameter int unsigned NLINE_MAX = 4096,
  parameter int unsigned W         = 44,
  parameter int unsigned HT        = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   prog_cycles,
  output int   comp_cycles,
  output int   list_len
);
  localparam int unsigned NBRAM  = calc_nbram(NLINE_MAX, NBLK);
  localparam int unsigned IDEPTH = NBLK;
  localparam int unsigned IAW    = (IDEPTH > 1) ? $clog2(IDEPTH) : 1;
  localparam int          LAT    = 7;
  localparam int          WI = W, HTI = HT, NBI = NBLK, HI = H;

  logic                 inst_we = 0, cfg_we = 0;
  logic [IAW-1:0]       inst_addr = '0;
  logic [31:0]          inst_data = '0;
  logic [15:0]          cfg_height = '0;
  logic                 in_valid = 0, in_ready;
  logic [NBLK-1:0][7:0] in_blk = '0;
  logic                 out_valid, out_last;
  logic [H-1:0][NBLK-1:0][7:0] out_win;
  logic [15:0]          out_line, out_x;

  dswim_buffer #(.H(H), .NBLK(NBLK), .NLINE_MAX(NLINE_MAX)) dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc++;

  byte unsigned img[];
  int remain_of_line[];
  int accept_time[$];
  int nout = 0;

  initial begin
    checks = 0; failures = 0; done = 0;
    prog_cycles = 0; comp_cycles = 0; list_len = 0;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10)
        $display("FAIL H=%0d NBLK=%0d W=%0d: %s at cycle %0d", H, NBLK, W, what, cyc);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int y, x0, t;
      y  = int'(out_line);
      x0 = int'(out_x);
      t  = accept_time.pop_front();
      nout++;
      check(cyc - t == LAT, "latency");
      for (int i = 0; i < NBI; i++) begin
        int s;
        s = y * WI + x0 + i;
        if (s < WI * HTI) check(out_win[H-1][i] == img[s], "bottom row");
        for (int r = 0; r < HI - 1; r++) begin
          int ly;
          ly = y - (HI - 1 - r);
          if (ly < 0) continue;
          if (x0 + i < WI) begin
            begin
              int a;
              a = ly * WI + x0 + i;
              check(out_win[r][i] == img[a], "upper row");
            end
          end else begin
            int xr;
            xr = x0 + i - WI;
            if (xr < remain_of_line[ly] && ly + 1 < HTI)
              begin
              int a;
              a = (ly + 1) * WI + xr;
              check(out_win[r][i] == img[a], "carried column");
            end
          end
        end
      end
    end
  end

  initial begin
    instr_q_t q;
    int nblocks, t0;
    wait (start);
    q = gen_instr(WI, NBI);
    list_len = q.size();
    img = new[WI * HTI];
    foreach (img[i]) img[i] = 8'($urandom);
    remain_of_line = new[HTI];
    for (int y = 0; y < HTI; y++) remain_of_line[y] = int'(q[y % q.size()].remain);
    @(negedge clk);
    foreach (q[i]) begin
      inst_we = 1; inst_addr = IAW'(i);
      inst_data = encode_instr(q[i], start_w(NBRAM), offset_w(), remain_w(NBLK), cycle_w(NLINE_MAX, NBLK));
      prog_cycles++;
      @(negedge clk);
    end
    inst_we = 0;
    cfg_we = 1; cfg_height = 16'(HT);
    @(negedge clk);
    cfg_we = 0;
    nblocks = (WI * HTI + NBI - 1) / NBI;
    t0 = cyc;
    for (int b = 0; b < nblocks; b++) begin
      in_valid = 1;
      for (int i = 0; i < NBI; i++) begin
        int s;
        s = b * NBI + i;
        in_blk[i] = (s < WI * HTI) ? img[s] : 8'h00;
      end
      check(in_ready == 1'b1, "ready while streaming");
      accept_time.push_back(cyc + 1);
      @(negedge clk);
    end
    in_valid = 0;
    comp_cycles = cyc - t0;
    check(comp_cycles == nblocks, "one block per cycle");
    check(in_ready == 1'b0, "not ready after last line");
    repeat (LAT + 2) @(negedge clk);
    check(nout == nblocks, "every block produced a window");
    done = 1;
  end
endmodule
