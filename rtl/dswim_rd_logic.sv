// dswim_rd_logic: buffer-read logic of the D-SWIM controller.
//
// Reverses the write-side transformation to build the output 2D window.
// The H-1 older lines come from the line buffers, which were all read at the
// positions of the block being written; the newest line is the input block
// itself, delayed to match. Three registered stages:
//   stage 1 (line-wise reorder): the LB outputs are put in image order, the
//     oldest line first: row r comes from LB (lb + 1 + r) mod H, where lb is
//     the LB that received the block.
//   stage 2 (circular left shift): each row is rotated left by `start` BRAM
//     widths, so that the BRAM holding the block's first pixels comes first.
//   stage 3 (pixel removal): `offset` leading pixels are dropped and N_blk
//     pixels kept, which aligns every row with the input block.
// The window is out_win[H-1:0]: out_win[0] is the oldest (top) line,
// out_win[H-1] the delayed input block; pixel 0 of each row is the leftmost.
// Inputs are the cycle after the write (BRAM read latency of one); outputs
// are registered, three cycles later. The tag is passed through unchanged.
module dswim_rd_logic
  import dswim_pkg::*;
#(
  parameter int unsigned H     = 3,
  parameter int unsigned NBLK  = 16,
  parameter int unsigned NBRAM = 3,
  parameter int unsigned TAG_W = 1,
  parameter int unsigned LBW   = NBRAM * PPW,
  parameter int unsigned SW    = (NBRAM > 1) ? $clog2(NBRAM) : 1,
  parameter int unsigned OW    = $clog2(PPW),
  parameter int unsigned LW    = (H > 1) ? $clog2(H) : 1
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 in_valid,
  input  logic [LW-1:0]                        in_lb,
  input  logic [SW-1:0]                        in_start,
  input  logic [OW-1:0]                        in_offset,
  input  logic [NBLK-1:0][PIX_W-1:0]           in_blk,
  input  logic [TAG_W-1:0]                     in_tag,
  input  logic [H-1:0][NBRAM-1:0][W_BRAM-1:0] rd_data,
  output logic                                 out_valid,
  output logic [H-1:0][NBLK-1:0][PIX_W-1:0]   out_win,
  output logic [TAG_W-1:0]                     out_tag
);
  localparam int unsigned NR = (H > 1) ? H - 1 : 1;  // rows read from LBs
  typedef logic [LBW-1:0][PIX_W-1:0] lbvec_t;

  // ---------------- stage 1: line-wise reordering
  lbvec_t [NR-1:0] ord;

  always_comb begin
    ord = '0;
    for (int r = 0; r < H - 1; r++) begin
      int unsigned src;
      src = (32'(in_lb) + 1 + r) % H;
      for (int b = 0; b < NBRAM; b++)
        for (int p = 0; p < PPW; p++)
          ord[r][b * PPW + p] = rd_data[src][b][PIX_W*p +: PIX_W];
    end
  end

  logic                       v1;
  lbvec_t [NR-1:0]            rows1;
  logic [SW-1:0]              s1;
  logic [OW-1:0]              off1;
  logic [NBLK-1:0][PIX_W-1:0] blk1;
  logic [TAG_W-1:0]           tag1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; rows1 <= '0; s1 <= '0; off1 <= '0; blk1 <= '0; tag1 <= '0;
    end else begin
      v1 <= in_valid; rows1 <= ord; s1 <= in_start; off1 <= in_offset;
      blk1 <= in_blk; tag1 <= in_tag;
    end
  end

  // ---------------- stage 2: circular left shift by whole BRAM widths
  lbvec_t [NR-1:0] cls;

  always_comb begin
    for (int r = 0; r < NR; r++)
      for (int j = 0; j < NBRAM; j++) begin
        int unsigned src;
        src = (j + 32'(s1)) % NBRAM;
        for (int p = 0; p < PPW; p++)
          cls[r][j * PPW + p] = rows1[r][src * PPW + p];
      end
  end

  logic                       v2;
  lbvec_t [NR-1:0]            rows2;
  logic [OW-1:0]              off2;
  logic [NBLK-1:0][PIX_W-1:0] blk2;
  logic [TAG_W-1:0]           tag2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; rows2 <= '0; off2 <= '0; blk2 <= '0; tag2 <= '0;
    end else begin
      v2 <= v1; rows2 <= cls; off2 <= off1; blk2 <= blk1; tag2 <= tag1;
    end
  end

  // ---------------- stage 3: pixel removal
  logic [H-1:0][NBLK-1:0][PIX_W-1:0] win;

  always_comb begin
    win = '0;
    for (int r = 0; r < H - 1; r++)
      for (int i = 0; i < NBLK; i++)
        win[r][i] = rows2[r][32'(off2) + i];
    win[H-1] = blk2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_win <= '0; out_tag <= '0;
    end else begin
      out_valid <= v2; out_win <= win; out_tag <= tag2;
    end
  end
endmodule
