// tb_harris: end-to-end test of the Harris corner pipeline (three D-SWIM
// buffers and its operators) against a software model of the same
// arithmetic: 3x3 Sobel gradients (right minus left, bottom minus top),
// divided by 8 with rounding toward minus infinity, 3x3 sums of gx^2, gy^2
// and gx*gy, R = sx*sy - sxy^2 - floor(3*(sx+sy)^2/64), corner if R >
// threshold. Two images are streamed with reprogramming in between: a
// random image 48 pixels wide (a multiple of the block size, so no line
// starts inside a block) and a 44-pixel-wide image of bright rectangles.
// Results are checked for every pixel at least 2 pixels from the border;
// on the 44-wide image, where lines start inside blocks, only from x = 18
// on. Also checks that the pipeline reports busy until drained.
module tb_harris;
  import dswim_pkg::*;
  import dswim_tb_pkg::*;
  localparam int NBLK = 16, NLINE_MAX = 4096, NBRAM = 3, R_W = 46;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic inst_we = 0, cfg_we = 0, busy, in_valid = 0, in_ready, out_valid;
  logic [3:0] inst_addr = 0;
  logic [31:0] inst_data = 0;
  logic [15:0] cfg_height = 0, out_line, out_x;
  logic signed [R_W-1:0] threshold = 0;
  logic [NBLK-1:0][7:0] in_blk = '0;
  logic signed [NBLK-1:0][R_W-1:0] out_r;
  logic [NBLK-1:0] out_corner;
  harris #(.NBLK(NBLK), .NLINE_MAX(NLINE_MAX)) dut (.*);

  int checks = 0, failures = 0, n_corner = 0, n_flat = 0;
  int N, NH, XMIN;
  int img [];
  longint rref [];
  bit     rdef [];

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  function automatic int px(int y, int x);
    return img[y * N + x];
  endfunction

  task automatic build_ref();
    int gx [], gy [];
    gx = new[N * NH]; gy = new[N * NH];
    rref = new[N * NH]; rdef = new[N * NH];
    foreach (rdef[i]) rdef[i] = 0;
    for (int y = 1; y < NH - 1; y++)
      for (int x = 1; x < N - 1; x++) begin
        int a, b;
        a = (px(y-1,x+1) + 2*px(y,x+1) + px(y+1,x+1)) - (px(y-1,x-1) + 2*px(y,x-1) + px(y+1,x-1));
        b = (px(y+1,x-1) + 2*px(y+1,x) + px(y+1,x+1)) - (px(y-1,x-1) + 2*px(y-1,x) + px(y-1,x+1));
        gx[y * N + x] = a >>> 3;
        gy[y * N + x] = b >>> 3;
      end
    for (int y = 2; y < NH - 2; y++)
      for (int x = XMIN; x < N - 2; x++) begin
        longint sx, sy, sxy, t;
        sx = 0; sy = 0; sxy = 0;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++) begin
            int i;
            i = (y + dy) * N + x + dx;
            sx += gx[i] * gx[i]; sy += gy[i] * gy[i]; sxy += gx[i] * gy[i];
          end
        t = sx + sy;
        rref[y * N + x] = sx * sy - sxy * sxy - ((3 * t * t) >>> 6);
        rdef[y * N + x] = 1;
      end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    for (int j = 0; j < NBLK; j++) begin
      int s;
      s = (int'(out_line) - 2) * N + int'(out_x) + j - 2;
      if (s >= 0 && s < N * NH && rdef[s]) begin
        chk(longint'($signed(out_r[j])) == rref[s], $sformatf("R at y=%0d x=%0d", s / N, s % N));
        chk(out_corner[j] == (rref[s] > longint'(threshold)), "corner flag");
        if (out_corner[j]) n_corner++; else n_flat++;
      end
    end
  end

  task automatic run(int w, int h, bit rect, longint thr);
    instr_q_t q;
    int nblocks;
    N = w; NH = h;
    XMIN = (w % NBLK == 0) ? 2 : 18;
    img = new[w * h];
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++)
        img[y * w + x] = rect ? ((((x >= 20 && x < 32) || x >= 38) && y >= 3 && y < 8) ? 200 : 20)
                              : int'($urandom_range(255));
    build_ref();
    while (busy) @(negedge clk);
    q = gen_instr(w, NBLK);
    foreach (q[i]) begin
      inst_we = 1; inst_addr = 4'(i);
      inst_data = encode_instr(q[i], start_w(NBRAM), offset_w(), remain_w(NBLK), cycle_w(NLINE_MAX, NBLK));
      @(negedge clk);
    end
    inst_we = 0; threshold = R_W'(thr);
    cfg_we = 1; cfg_height = 16'(h);
    @(negedge clk);
    cfg_we = 0;
    nblocks = (w * h + NBLK - 1) / NBLK;
    for (int b = 0; b < nblocks; b++) begin
      if ($urandom_range(4) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      for (int i = 0; i < NBLK; i++)
        in_blk[i] = (b * NBLK + i < w * h) ? 8'(img[b * NBLK + i]) : 8'h00;
      @(negedge clk);
    end
    in_valid = 0;
    chk(busy == 1'b1, "busy while draining");
    repeat (25) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(48, 10, 0, 0);
    run(44, 11, 1, 1000000);
    while (busy) @(negedge clk);
    chk(n_corner > 0 && n_flat > 0, "both corner and non-corner results seen");
    $display("corner results=%0d other results=%0d", n_corner, n_flat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
