// harris_rc: corner response and threshold operator (rc) of the Harris
// corner detector.
//
// For each of the N_blk positions of a block it receives the entries of the
// gradient matrix M = [sx sxy; sxy sy] and computes
//   R = det(M) - k * trace(M)^2 = sx*sy - sxy^2 - k*(sx+sy)^2
// with k = K_NUM / 2^K_SHIFT (default 3/64 = 0.047, inside the usual
// 0.04..0.06 range; the k term is rounded toward minus infinity), then
// flags a corner where R > threshold. Two register stages: products, then
// R and the comparison. One block per cycle.
module harris_rc #(
  parameter int unsigned NBLK    = 16,
  parameter int unsigned SUM_W   = 21,
  parameter int unsigned R_W     = 2 * SUM_W + 4,
  parameter int unsigned K_NUM   = 3,
  parameter int unsigned K_SHIFT = 6
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic signed [R_W-1:0]             threshold,
  input  logic                              in_valid,
  input  logic signed [NBLK-1:0][SUM_W-1:0] in_sx,
  input  logic signed [NBLK-1:0][SUM_W-1:0] in_sy,
  input  logic signed [NBLK-1:0][SUM_W-1:0] in_sxy,
  input  logic [15:0]                       in_line,
  input  logic [15:0]                       in_x,
  output logic                              out_valid,
  output logic signed [NBLK-1:0][R_W-1:0]   out_r,
  output logic [NBLK-1:0]                   out_corner,
  output logic [15:0]                       out_line,
  output logic [15:0]                       out_x
);
  // stage 1: det and trace^2
  logic signed [NBLK-1:0][R_W-1:0] det1, tsq1;
  logic                            v1;
  logic [15:0]                     line1, x1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      det1 <= '0; tsq1 <= '0; v1 <= 1'b0; line1 <= '0; x1 <= '0;
    end else begin
      v1 <= in_valid;
      line1 <= in_line; x1 <= in_x;
      for (int j = 0; j < NBLK; j++) begin
        logic signed [R_W-1:0] a, b, c, t;
        a = R_W'($signed(in_sx[j]));
        b = R_W'($signed(in_sy[j]));
        c = R_W'($signed(in_sxy[j]));
        t = a + b;
        det1[j] <= a * b - c * c;
        tsq1[j] <= t * t;
      end
    end
  end

  // stage 2: R and threshold
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_r <= '0; out_corner <= '0; out_line <= '0; out_x <= '0;
    end else begin
      out_valid <= v1;
      out_line <= line1; out_x <= x1;
      for (int j = 0; j < NBLK; j++) begin
        logic signed [R_W-1:0] r;
        r = det1[j] - ((tsq1[j] * $signed(R_W'(K_NUM))) >>> K_SHIFT);
        out_r[j]      <= r;
        out_corner[j] <= (r > threshold);
      end
    end
  end
endmodule
