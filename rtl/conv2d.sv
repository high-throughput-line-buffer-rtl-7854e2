// conv2d: array of N_blk parallel convolution operators fed by a D-SWIM
// buffer.
//
// Each cycle the buffer delivers an H x N_blk window; the N_blk windows of
// KW columns that end in each of its columns are convolved at once. The
// windows at the left edge need the last KW-1 columns of the previous block,
// so those columns are kept in registers (updated only on valid input).
// Window j spans window columns j-KW+1 .. j, i.e. stream x positions
// in_x+j-KW+1 .. in_x+j, and its result is out_blk[j]. Each operator is a
// multiply-accumulate of the H*KW unsigned pixels with signed 8-bit
// weights, with full precision (ACC_W bits, signed). Windows that straddle a
// line end or the top of the image give results the consumer discards.
// Latency: one register stage (inputs to out_*), one block per cycle. The
// weights are ports (kernel row-major, weights[r][c], r = 0 the top line)
// and are expected to stay constant while an image streams.
module conv2d
  import dswim_pkg::*;
#(
  parameter int unsigned H     = 3,
  parameter int unsigned KW    = 3,
  parameter int unsigned NBLK  = 16,
  parameter int unsigned ACC_W = PIX_W + 8 + $clog2(H * KW) + 1
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic signed [H-1:0][KW-1:0][7:0]      weights,
  input  logic                                  in_valid,
  input  logic        [H-1:0][NBLK-1:0][PIX_W-1:0] in_win,
  input  logic [15:0]                           in_line,
  input  logic [15:0]                           in_x,
  input  logic                                  in_last,
  output logic                                  out_valid,
  output logic signed [NBLK-1:0][ACC_W-1:0]     out_blk,
  output logic [15:0]                           out_line,
  output logic [15:0]                           out_x,
  output logic                                  out_last
);
  localparam int unsigned NC = NBLK + KW - 1;   // columns seen by the array

  // previous-block columns: prev[r][c] is column NBLK-(KW-1)+c of the last window
  logic [H-1:0][KW-2:0][PIX_W-1:0] prev;
  logic [H-1:0][NC-1:0][PIX_W-1:0] cols;

  always_comb begin
    for (int r = 0; r < H; r++) begin
      for (int c = 0; c < KW - 1; c++) cols[r][c] = prev[r][c];
      for (int c = 0; c < NBLK; c++)   cols[r][KW - 1 + c] = in_win[r][c];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prev <= '0;
    else if (in_valid)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < KW - 1; c++)
          prev[r][c] <= in_win[r][NBLK - (KW - 1) + c];
  end

  logic signed [NBLK-1:0][ACC_W-1:0] acc;

  always_comb begin
    for (int j = 0; j < NBLK; j++) begin
      acc[j] = '0;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < KW; c++)
          acc[j] += ACC_W'($signed({1'b0, cols[r][j + c]}) * $signed(weights[r][c]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_blk <= '0; out_line <= '0; out_x <= '0; out_last <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_blk <= acc; out_line <= in_line; out_x <= in_x; out_last <= in_last;
      end
    end
  end
endmodule
