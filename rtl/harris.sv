// harris: Harris corner detector built on three D-SWIM buffers.
//
// Dataflow (3x3 windows throughout):
//   input blocks -> Buf1 -> dx, dy (3x3 Sobel convolutions, N_blk in
//   parallel) -> gradients scaled to signed 8 bits (divided by 8, which maps
//   the Sobel range -1020..1020 onto -128..127) -> Buf2 (dI/dx), Buf3 (dI/dy)
//   -> sx = sum gx*gx, sy = sum gy*gy, sxy = sum gx*gy over the 3x3 window
//   -> rc: R = det(M) - k*trace(M)^2, corner where R > threshold.
// Buf2 and Buf3 hold the gradient images as block streams of the same width
// as the input; the gradient of pixel (Y, X) sits one line and one pixel
// later in their streams (stream index + N_line + 1), which keeps every
// stream block-aligned without extra buffering. Consequently the result
// out_r[j]/out_corner[j] reported with (out_line, out_x) belongs to the
// input pixel at stream index (out_line-2)*N_line + out_x + j - 2.
// Results near the image border, and for the first N_blk+2 pixels of lines
// that start inside a block, are not meaningful.
//
// Programming: the instruction list and the height are broadcast to all
// three buffers. Program only while busy is low: busy is high from arming
// until every buffer has drained the image.
// One block per cycle in and out. Results tagged (line, x) leave 18 cycles
// after Buf1 accepted the input block with the same tag (7 in Buf1, 1 in
// dx/dy, 7 in Buf2/Buf3, 1 in sx/sy/sxy, 2 in rc).
module harris
  import dswim_pkg::*;
#(
  parameter int unsigned NBLK      = 16,
  parameter int unsigned NLINE_MAX = 4096,
  parameter int unsigned IDEPTH    = NBLK,
  parameter int unsigned IAW       = (IDEPTH > 1) ? $clog2(IDEPTH) : 1,
  parameter int unsigned SUM_W     = 2 * PIX_W + $clog2(9) + 1,
  parameter int unsigned R_W       = 2 * SUM_W + 4
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            inst_we,
  input  logic [IAW-1:0]                  inst_addr,
  input  logic [INSTR_W-1:0]              inst_data,
  input  logic                            cfg_we,
  input  logic [15:0]                     cfg_height,
  input  logic signed [R_W-1:0]           threshold,
  output logic                            busy,
  input  logic                            in_valid,
  output logic                            in_ready,
  input  logic [NBLK-1:0][PIX_W-1:0]      in_blk,
  output logic                            out_valid,
  output logic signed [NBLK-1:0][R_W-1:0] out_r,
  output logic [NBLK-1:0]                 out_corner,
  output logic [15:0]                     out_line,
  output logic [15:0]                     out_x
);
  localparam int unsigned H     = 3;
  localparam int unsigned G_W   = PIX_W + 8 + $clog2(9) + 1;   // conv2d accumulator
  localparam int unsigned DRAIN = 31;

  // Sobel kernels, weights[r][c], r = 0 the top line, c = 0 the left column
  localparam logic signed [H-1:0][2:0][7:0] SOBEL_X =
    {8'sd1, 8'sd0, -8'sd1,  8'sd2, 8'sd0, -8'sd2,  8'sd1, 8'sd0, -8'sd1};
  localparam logic signed [H-1:0][2:0][7:0] SOBEL_Y =
    {8'sd1, 8'sd2, 8'sd1,  8'sd0, 8'sd0, 8'sd0,  -8'sd1, -8'sd2, -8'sd1};

  // ---------------- Buf1
  logic                               w1_valid, w1_last;
  logic [H-1:0][NBLK-1:0][PIX_W-1:0]  w1_win;
  logic [15:0]                        w1_line, w1_x;

  dswim_buffer #(.H(H), .NBLK(NBLK), .NLINE_MAX(NLINE_MAX), .IDEPTH(IDEPTH)) u_buf1 (
    .clk, .rst_n, .inst_we, .inst_addr, .inst_data, .cfg_we, .cfg_height,
    .in_valid, .in_ready, .in_blk,
    .out_valid (w1_valid), .out_win (w1_win), .out_line (w1_line),
    .out_x (w1_x), .out_last (w1_last)
  );

  // ---------------- dx, dy
  logic                             gx_valid, gy_valid, gx_last, gy_last;
  logic signed [NBLK-1:0][G_W-1:0]  gx, gy;
  logic [15:0]                      gx_line, gx_x, gy_line, gy_x;

  conv2d #(.H(H), .KW(3), .NBLK(NBLK), .ACC_W(G_W)) u_dx (
    .clk, .rst_n, .weights (SOBEL_X),
    .in_valid (w1_valid), .in_win (w1_win), .in_line (w1_line), .in_x (w1_x),
    .in_last (w1_last),
    .out_valid (gx_valid), .out_blk (gx), .out_line (gx_line), .out_x (gx_x),
    .out_last (gx_last)
  );
  conv2d #(.H(H), .KW(3), .NBLK(NBLK), .ACC_W(G_W)) u_dy (
    .clk, .rst_n, .weights (SOBEL_Y),
    .in_valid (w1_valid), .in_win (w1_win), .in_line (w1_line), .in_x (w1_x),
    .in_last (w1_last),
    .out_valid (gy_valid), .out_blk (gy), .out_line (gy_line), .out_x (gy_x),
    .out_last (gy_last)
  );

  logic [NBLK-1:0][PIX_W-1:0] gx8, gy8;
  always_comb begin
    for (int j = 0; j < NBLK; j++) begin
      gx8[j] = PIX_W'($signed(gx[j]) >>> 3);
      gy8[j] = PIX_W'($signed(gy[j]) >>> 3);
    end
  end

  // ---------------- Buf2, Buf3
  logic                               b2_ready, b3_ready;
  logic                               w2_valid, w3_valid, w2_last, w3_last;
  logic [H-1:0][NBLK-1:0][PIX_W-1:0]  w2_win, w3_win;
  logic [15:0]                        w2_line, w2_x, w3_line, w3_x;

  dswim_buffer #(.H(H), .NBLK(NBLK), .NLINE_MAX(NLINE_MAX), .IDEPTH(IDEPTH)) u_buf2 (
    .clk, .rst_n, .inst_we, .inst_addr, .inst_data, .cfg_we, .cfg_height,
    .in_valid (gx_valid), .in_ready (b2_ready), .in_blk (gx8),
    .out_valid (w2_valid), .out_win (w2_win), .out_line (w2_line),
    .out_x (w2_x), .out_last (w2_last)
  );
  dswim_buffer #(.H(H), .NBLK(NBLK), .NLINE_MAX(NLINE_MAX), .IDEPTH(IDEPTH)) u_buf3 (
    .clk, .rst_n, .inst_we, .inst_addr, .inst_data, .cfg_we, .cfg_height,
    .in_valid (gy_valid), .in_ready (b3_ready), .in_blk (gy8),
    .out_valid (w3_valid), .out_win (w3_win), .out_line (w3_line),
    .out_x (w3_x), .out_last (w3_last)
  );

  // ---------------- sx, sy, sxy
  logic                               sx_valid, sy_valid, sxy_valid;
  logic signed [NBLK-1:0][SUM_W-1:0]  sx, sy, sxy;
  logic [15:0]                        s_line, s_x, sy_line, sy_x, sxy_line, sxy_x;

  harris_sum #(.H(H), .KW(3), .NBLK(NBLK), .SUM_W(SUM_W)) u_sx (
    .clk, .rst_n, .in_valid (w2_valid), .in_a (w2_win), .in_b (w2_win),
    .in_line (w2_line), .in_x (w2_x),
    .out_valid (sx_valid), .out_sum (sx), .out_line (s_line), .out_x (s_x)
  );
  harris_sum #(.H(H), .KW(3), .NBLK(NBLK), .SUM_W(SUM_W)) u_sy (
    .clk, .rst_n, .in_valid (w3_valid), .in_a (w3_win), .in_b (w3_win),
    .in_line (w3_line), .in_x (w3_x),
    .out_valid (sy_valid), .out_sum (sy), .out_line (sy_line), .out_x (sy_x)
  );
  harris_sum #(.H(H), .KW(3), .NBLK(NBLK), .SUM_W(SUM_W)) u_sxy (
    .clk, .rst_n, .in_valid (w2_valid), .in_a (w2_win), .in_b (w3_win),
    .in_line (w2_line), .in_x (w2_x),
    .out_valid (sxy_valid), .out_sum (sxy), .out_line (sxy_line), .out_x (sxy_x)
  );

  // ---------------- rc
  harris_rc #(.NBLK(NBLK), .SUM_W(SUM_W), .R_W(R_W)) u_rc (
    .clk, .rst_n, .threshold,
    .in_valid (sx_valid), .in_sx (sx), .in_sy (sy), .in_sxy (sxy),
    .in_line (s_line), .in_x (s_x),
    .out_valid, .out_r, .out_corner, .out_line, .out_x
  );

  // ---------------- busy: armed, or blocks still draining
  logic [4:0] drain;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                  drain <= '0;
    else if (cfg_we || (in_valid && in_ready) || gx_valid || w2_valid || sx_valid)
                                                 drain <= 5'(DRAIN);
    else if (drain != '0)                        drain <= drain - 1'b1;
  end
  assign busy = in_ready || b2_ready || b3_ready || (drain != '0);

  // The gradient buffers run in lock step with Buf1 and must never refuse.
  a_b2_ready: assert property (@(posedge clk) disable iff (!rst_n) gx_valid |-> b2_ready);
  a_b3_ready: assert property (@(posedge clk) disable iff (!rst_n) gy_valid |-> b3_ready);
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    w2_valid |-> (w3_valid && sx_valid == sy_valid && w2_line == w3_line && w2_x == w3_x));
endmodule
