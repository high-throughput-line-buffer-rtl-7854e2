// tb_dswim_top: end-to-end test of dswim_top at its default parameters
// (16-pixel blocks, 3-line windows, lines up to 4096 pixels).
//
// Conv2D pipeline: four images of widths 44, 100, 4096 (the widest line)
// and 64 are streamed back to back with reprogramming in between, with
// random input gaps. For every result, the 3x3 convolution centred on
// stream pixel (line-1, x+j-1) is compared with a software convolution
// wherever the centre is at least one pixel from the border (and, on
// widths that are not a multiple of 16, from x = 17 on, because the window
// columns of a line's first pixels are only partly valid there). The bottom
// row of every raw window is compared with the input stream.
// Harris pipeline: one 32-pixel-wide random image, responses checked
// against the software model at every pixel 2 or more from the border.
// Mechanisms counted, each of which must occur: image-size switches,
// blocks carrying pixels of the next line, instruction-list wrap-around
// (RETURN), line-buffer rolling past the last LB, input gaps, end of image
// (input no longer accepted), and corner detections.
module tb_dswim_top;
  import dswim_pkg::*;
  import dswim_tb_pkg::*;
  localparam int NBLK = 16, NLINE_MAX = 4096, H = 3, R_W = 46, ACC_W = 21;
  localparam int NBRAM = calc_nbram(NLINE_MAX, NBLK);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic c_inst_we = 0, c_cfg_we = 0, c_in_valid = 0, c_in_ready;
  logic [3:0] c_inst_addr = 0, h_inst_addr = 0;
  logic [31:0] c_inst_data = 0, h_inst_data = 0;
  logic [15:0] c_cfg_height = 0, h_cfg_height = 0;
  logic signed [H-1:0][2:0][7:0] c_weights;
  logic [NBLK-1:0][7:0] c_in_blk = '0, h_in_blk = '0;
  logic c_win_valid, c_win_last, c_res_valid, c_res_last;
  logic [H-1:0][NBLK-1:0][7:0] c_win;
  logic [15:0] c_win_line, c_win_x, c_res_line, c_res_x, h_out_line, h_out_x;
  logic signed [NBLK-1:0][ACC_W-1:0] c_res;
  logic h_inst_we = 0, h_cfg_we = 0, h_busy, h_in_valid = 0, h_in_ready, h_out_valid;
  logic signed [R_W-1:0] h_threshold = 0;
  logic signed [NBLK-1:0][R_W-1:0] h_out_r;
  logic [NBLK-1:0] h_out_corner;

  dswim_top dut (.*);

  int checks = 0, failures = 0;
  int n_switch = 0, n_carry = 0, n_wrap = 0, n_roll = 0, n_gap = 0, n_end = 0, n_corner = 0;
  int n_conv_checked = 0, n_r_checked = 0;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // ---------------- Conv2D side
  int N, NH, XMIN, PLIST;
  int img [];
  int w [3][3];

  always @(posedge clk) if (rst_n && c_win_valid) begin
    for (int i = 0; i < NBLK; i++) begin
      int s;
      s = int'(c_win_line) * N + int'(c_win_x) + i;
      if (s < N * NH) chk(c_win[H-1][i] == 8'(img[s]), "window bottom row");
    end
    if (c_win_last && int'(c_win_x) + NBLK > N) n_carry++;
    if (int'(c_win_line) >= PLIST && c_win_x < 16) n_wrap++;
    if (int'(c_win_line) >= H && c_win_x < 16) n_roll++;
  end

  always @(posedge clk) if (rst_n && c_res_valid) begin
    for (int j = 0; j < NBLK; j++) begin
      int s, y, x, e;
      s = (int'(c_res_line) - 1) * N + int'(c_res_x) + j - 1;
      if (s < 0) continue;
      y = s / N; x = s % N;
      if (y >= 1 && y < NH - 1 && x >= XMIN && x < N - 1) begin
        e = 0;
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) e += w[r][c] * img[(y - 1 + r) * N + x - 1 + c];
        chk(int'($signed(c_res[j])) == e, $sformatf("conv at y=%0d x=%0d", y, x));
        n_conv_checked++;
      end
    end
  end

  task automatic conv_image(int width, int height);
    instr_q_t q;
    int nblocks;
    N = width; NH = height;
    XMIN = (width % NBLK == 0) ? 1 : 17;
    img = new[width * height];
    foreach (img[i]) img[i] = int'($urandom_range(255));
    q = gen_instr(width, NBLK);
    PLIST = q.size();
    foreach (q[i]) begin
      c_inst_we = 1; c_inst_addr = 4'(i);
      c_inst_data = encode_instr(q[i], start_w(NBRAM), offset_w(), remain_w(NBLK), cycle_w(NLINE_MAX, NBLK));
      @(negedge clk);
    end
    c_inst_we = 0;
    c_cfg_we = 1; c_cfg_height = 16'(height);
    @(negedge clk);
    c_cfg_we = 0;
    n_switch++;
    nblocks = (width * height + NBLK - 1) / NBLK;
    for (int b = 0; b < nblocks; b++) begin
      if ($urandom_range(7) == 0) begin c_in_valid = 0; n_gap++; @(negedge clk); end
      c_in_valid = 1;
      for (int i = 0; i < NBLK; i++)
        c_in_blk[i] = (b * NBLK + i < width * height) ? 8'(img[b * NBLK + i]) : 8'h00;
      chk(c_in_ready, "conv pipeline ready during image");
      @(negedge clk);
    end
    c_in_valid = 0;
    if (!c_in_ready) n_end++;
    repeat (12) @(negedge clk);
  endtask

  // ---------------- Harris side
  int HN = 32, HH = 9;
  int himg [];
  longint rref [];
  bit rdef [];

  always @(posedge clk) if (rst_n && h_out_valid) begin
    for (int j = 0; j < NBLK; j++) begin
      int s;
      s = (int'(h_out_line) - 2) * HN + int'(h_out_x) + j - 2;
      if (s >= 0 && s < HN * HH && rdef[s]) begin
        chk(longint'($signed(h_out_r[j])) == rref[s], "harris response");
        chk(h_out_corner[j] == (rref[s] > longint'(h_threshold)), "harris flag");
        n_r_checked++;
        if (h_out_corner[j]) n_corner++;
      end
    end
  end

  task automatic harris_image();
    instr_q_t q;
    int gx [], gy [];
    himg = new[HN * HH]; gx = new[HN * HH]; gy = new[HN * HH];
    rref = new[HN * HH]; rdef = new[HN * HH];
    foreach (himg[i]) himg[i] = int'($urandom_range(255));
    foreach (rdef[i]) rdef[i] = 0;
    for (int y = 1; y < HH - 1; y++)
      for (int x = 1; x < HN - 1; x++) begin
        int a, b, i;
        i = y * HN + x;
        a = (himg[i-HN+1] + 2*himg[i+1] + himg[i+HN+1]) - (himg[i-HN-1] + 2*himg[i-1] + himg[i+HN-1]);
        b = (himg[i+HN-1] + 2*himg[i+HN] + himg[i+HN+1]) - (himg[i-HN-1] + 2*himg[i-HN] + himg[i-HN+1]);
        gx[i] = a >>> 3; gy[i] = b >>> 3;
      end
    for (int y = 2; y < HH - 2; y++)
      for (int x = 2; x < HN - 2; x++) begin
        longint sx, sy, sxy, t;
        sx = 0; sy = 0; sxy = 0;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++) begin
            int i;
            i = (y + dy) * HN + x + dx;
            sx += gx[i] * gx[i]; sy += gy[i] * gy[i]; sxy += gx[i] * gy[i];
          end
        t = sx + sy;
        rref[y * HN + x] = sx * sy - sxy * sxy - ((3 * t * t) >>> 6);
        rdef[y * HN + x] = 1;
      end
    q = gen_instr(HN, NBLK);
    foreach (q[i]) begin
      h_inst_we = 1; h_inst_addr = 4'(i);
      h_inst_data = encode_instr(q[i], start_w(NBRAM), offset_w(), remain_w(NBLK), cycle_w(NLINE_MAX, NBLK));
      @(negedge clk);
    end
    h_inst_we = 0;
    h_threshold = 0;
    h_cfg_we = 1; h_cfg_height = 16'(HH);
    @(negedge clk);
    h_cfg_we = 0;
    for (int b = 0; b < HN * HH / NBLK; b++) begin
      h_in_valid = 1;
      for (int i = 0; i < NBLK; i++) h_in_blk[i] = 8'(himg[b * NBLK + i]);
      @(negedge clk);
    end
    h_in_valid = 0;
    while (h_busy) @(negedge clk);
  endtask

  initial begin
    // a smoothing-and-edge kernel with negative and positive weights
    w = '{'{1, 2, 1}, '{0, -4, 3}, '{-1, 2, -5}};
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) c_weights[r][c] = 8'(w[r][c]);
    repeat (2) @(negedge clk);
    rst_n = 1;
    conv_image(44, 10);
    conv_image(100, 8);
    conv_image(4096, 5);
    conv_image(64, 6);
    harris_image();
    $display("size switches=%0d carried-pixel blocks=%0d list wraps=%0d LB rolls=%0d gaps=%0d image ends=%0d corners=%0d",
             n_switch, n_carry, n_wrap, n_roll, n_gap, n_end, n_corner);
    $display("conv results checked=%0d harris responses checked=%0d", n_conv_checked, n_r_checked);
    chk(n_switch > 1, "image-size switch happened");
    chk(n_carry > 0, "carried pixels happened");
    chk(n_wrap > 0, "instruction list wrap happened");
    chk(n_roll > 0, "line-buffer rolling happened");
    chk(n_gap > 0, "input gap happened");
    chk(n_end > 0, "end of image happened");
    chk(n_corner > 0, "corner detected");
    chk(n_conv_checked > 0 && n_r_checked > 0, "results were checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
