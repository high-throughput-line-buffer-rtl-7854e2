// harris_sum: window product-sum operator array (the sx, sy and sxy
// operators of the Harris corner detector).
//
// Takes two H x N_blk windows of signed 8-bit values delivered in the same
// cycle by two D-SWIM buffers (or the same window twice) and, for each of
// the N_blk windows of KW columns ending in each block column, sums the
// element-wise products a*b over the H x KW window. As in conv2d, the last
// KW-1 columns of the previous block are kept in registers so that windows
// may straddle two blocks. out_sum[j] covers stream x positions
// in_x+j-KW+1 .. in_x+j. One register stage; one block per cycle.
module harris_sum
  import dswim_pkg::*;
#(
  parameter int unsigned H     = 3,
  parameter int unsigned KW    = 3,
  parameter int unsigned NBLK  = 16,
  parameter int unsigned SUM_W = 2 * PIX_W + $clog2(H * KW) + 1
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic                                    in_valid,
  input  logic signed [H-1:0][NBLK-1:0][PIX_W-1:0] in_a,
  input  logic signed [H-1:0][NBLK-1:0][PIX_W-1:0] in_b,
  input  logic [15:0]                             in_line,
  input  logic [15:0]                             in_x,
  output logic                                    out_valid,
  output logic signed [NBLK-1:0][SUM_W-1:0]       out_sum,
  output logic [15:0]                             out_line,
  output logic [15:0]                             out_x
);
  localparam int unsigned NC = NBLK + KW - 1;

  logic [H-1:0][KW-2:0][PIX_W-1:0] prev_a, prev_b;
  logic [H-1:0][NC-1:0][PIX_W-1:0] ca, cb;

  always_comb begin
    for (int r = 0; r < H; r++) begin
      for (int c = 0; c < KW - 1; c++) begin
        ca[r][c] = prev_a[r][c];
        cb[r][c] = prev_b[r][c];
      end
      for (int c = 0; c < NBLK; c++) begin
        ca[r][KW - 1 + c] = in_a[r][c];
        cb[r][KW - 1 + c] = in_b[r][c];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_a <= '0; prev_b <= '0;
    end else if (in_valid) begin
      for (int r = 0; r < H; r++)
        for (int c = 0; c < KW - 1; c++) begin
          prev_a[r][c] <= in_a[r][NBLK - (KW - 1) + c];
          prev_b[r][c] <= in_b[r][NBLK - (KW - 1) + c];
        end
    end
  end

  logic signed [NBLK-1:0][SUM_W-1:0] acc;

  always_comb begin
    for (int j = 0; j < NBLK; j++) begin
      acc[j] = '0;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < KW; c++)
          acc[j] += SUM_W'($signed(ca[r][j + c]) * $signed(cb[r][j + c]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_sum <= '0; out_line <= '0; out_x <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sum <= acc; out_line <= in_line; out_x <= in_x;
      end
    end
  end
endmodule
