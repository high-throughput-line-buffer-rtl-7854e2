// tb_dswim_buffer: self-checking test of the complete D-SWIM buffer.
//
// Streams several images of different widths back to back through one
// buffer instance, reprogramming the instruction list and height between
// images (widths 44, 36, 63, 100, 16, 257). Pixels are random. For every
// output window the test checks
//  * the bottom row against the input stream,
//  * every upper-row pixel that lies inside the block's own line against
//    the pixel directly above it in the image (line index >= H-1),
//  * upper-row pixels of a line-end block that belong to the next line,
//    where the older lines carried at least as many pixels (they come from
//    the duplicated copies of those pixels),
//  * the latency of 7 cycles from acceptance to output, and the line index
//    and x position reported with the window.
// The first image is streamed without gaps to check one block per cycle;
// later ones with random gaps. It also checks that the generated
// instruction list for width 44 is the four-entry list
// (0,0,4,3,0) (0,4,8,3,0) (1,0,12,3,0) (1,4,0,2,1).
module tb_dswim_buffer;
  import dswim_pkg::*;
  import dswim_tb_pkg::*;

  localparam int H = 3, NBLK = 16, NLINE_MAX = 4096;
  localparam int NBRAM = calc_nbram(NLINE_MAX, NBLK);
  localparam int LAT = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        inst_we = 0, cfg_we = 0;
  logic [3:0]  inst_addr = 0;
  logic [31:0] inst_data = 0;
  logic [15:0] cfg_height = 0;
  logic        in_valid = 0, in_ready;
  logic [NBLK-1:0][7:0] in_blk = '0;
  logic        out_valid, out_last;
  logic [H-1:0][NBLK-1:0][7:0] out_win;
  logic [15:0] out_line, out_x;

  dswim_buffer #(.H(H), .NBLK(NBLK), .NLINE_MAX(NLINE_MAX)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int rem_cols_checked = 0, gap_cycles = 0;
  always @(posedge clk) cyc++;

  // current image
  int nline, nheight;
  byte unsigned img[];      // nline * nheight pixels, stream order
  int remain_of_line[];     // pixels of line y+1 carried in line y's last block
  int accept_time[$];

  function automatic int pix(int y, int x);
    return img[y * nline + x];
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // ---------------- output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int y, x0, t;
      y  = int'(out_line);
      x0 = int'(out_x);
      t  = accept_time.pop_front();
      check(cyc - t == LAT, $sformatf("latency %0d", cyc - t));
      for (int i = 0; i < NBLK; i++) begin
        int s;
        s = y * nline + x0 + i;
        if (s < nline * nheight)
          check(out_win[H-1][i] == img[s], $sformatf("bottom row y=%0d x=%0d", y, x0 + i));
        for (int r = 0; r < H - 1; r++) begin
          int ly;
          ly = y - (H - 1 - r);
          if (ly < 0) continue;
          if (x0 + i < nline) begin
            check(out_win[r][i] == pix(ly, x0 + i),
                  $sformatf("row %0d y=%0d x=%0d", r, y, x0 + i));
          end else begin
            int xr;
            xr = x0 + i - nline;
            if (xr < remain_of_line[ly] && ly + 1 < nheight) begin
              check(out_win[r][i] == pix(ly + 1, xr),
                    $sformatf("carried row %0d y=%0d x'=%0d", r, y, xr));
              rem_cols_checked++;
            end
          end
        end
      end
    end
  end

  task automatic run_image(int w, int h, bit gaps);
    instr_q_t q;
    int nblocks, r;
    nline = w; nheight = h;
    q = gen_instr(w, NBLK);
    img = new[w * h];
    foreach (img[i]) img[i] = 8'($urandom);
    remain_of_line = new[h];
    for (int y = 0; y < h; y++) remain_of_line[y] = int'(q[y % q.size()].remain);
    // program: instructions then height
    @(negedge clk);
    foreach (q[i]) begin
      inst_we = 1; inst_addr = 4'(i); inst_data = encode_instr(q[i], start_w(NBRAM), offset_w(), remain_w(NBLK), cycle_w(NLINE_MAX, NBLK));
      @(negedge clk);
    end
    inst_we = 0;
    cfg_we = 1; cfg_height = 16'(h);
    @(negedge clk);
    cfg_we = 0;
    nblocks = (w * h + NBLK - 1) / NBLK;
    for (int b = 0; b < nblocks; b++) begin
      if (gaps) while ($urandom_range(3) == 0) begin
        in_valid = 0; gap_cycles++;
        @(negedge clk);
      end
      in_valid = 1;
      for (int i = 0; i < NBLK; i++) begin
        int s;
        s = b * NBLK + i;
        in_blk[i] = (s < w * h) ? img[s] : 8'h00;
      end
      check(in_ready == 1'b1, "ready while streaming");
      accept_time.push_back(cyc + 1);
      @(negedge clk);
    end
    in_valid = 0;
    check(in_ready == 1'b0, "not ready after last line");
    repeat (LAT + 2) @(negedge clk);
    check(accept_time.size() == 0, "every block produced a window");
  endtask

  initial begin
    instr_q_t q;
    q = gen_instr(44, 16);
    check(q.size() == 4, "list length for width 44");
    if (q.size() == 4) begin
      check(q[0].start == 0 && q[0].offset == 0 && q[0].remain == 4  && q[0].cycles == 3 && !q[0].ret, "instr0");
      check(q[1].start == 0 && q[1].offset == 4 && q[1].remain == 8  && q[1].cycles == 3 && !q[1].ret, "instr1");
      check(q[2].start == 1 && q[2].offset == 0 && q[2].remain == 12 && q[2].cycles == 3 && !q[2].ret, "instr2");
      check(q[3].start == 1 && q[3].offset == 4 && q[3].remain == 0  && q[3].cycles == 2 &&  q[3].ret, "instr3");
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_image(44, 12, 0);
    run_image(36, 9, 1);
    run_image(63, 20, 1);
    run_image(100, 7, 1);
    run_image(16, 5, 1);
    run_image(257, 6, 1);
    check(rem_cols_checked > 0, "carried-pixel columns exercised");
    check(gap_cycles > 0, "input gaps exercised");
    $display("carried columns checked=%0d gap cycles=%0d", rem_cols_checked, gap_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
