// dswim_wr_logic: buffer-write logic of the D-SWIM controller.
//
// Turns an N_blk-pixel input block into the write data, byte masks and
// control of the H line buffers. Each LB is NBRAM*8 pixels wide, wider than
// a block, so the block is spread over the LB width in two registered steps:
//   stage 1 (place-holder padding): the block is placed at pixel offset
//     `offset` of an LB-wide vector; the pixels around it are place-holders
//     whose mask bit is 0.
//   stage 2 (circular right shift): the padded vector is rotated by `start`
//     BRAM widths so that its first BRAM slot lands in BRAM `start`.
// The offset is fixed for a whole line (N_blk is a multiple of 8), while
// `start` advances by N_blk/8 BRAMs (modulo NBRAM) from block to block; the
// controller supplies both. In parallel, the last `remain` pixels of the
// last block of a line (they belong to the next line) are moved to the front
// of a second vector with a mask of `remain` leading ones; they are written
// at the beginning of the next LB in the same cycle as the main write.
//
// Timing: inputs are registered (stage 0), then padding and shifting each
// take one register stage; the write outputs are combinational from the
// stage-2 registers, three cycles after the block is accepted. A counter
// increments when its BRAM's byte 7 is written (the word is complete); the
// counters of the current LB are reset after the last block of a line, and
// all counters are reset by `clear`. The raw block and an opaque tag are
// carried along for the read side. The stage structure follows the
// buffer-write description; the increment rule and the tag are this
// design's own.
module dswim_wr_logic
  import dswim_pkg::*;
#(
  parameter int unsigned H     = 3,
  parameter int unsigned NBLK  = 16,
  parameter int unsigned NBRAM = 3,
  parameter int unsigned TAG_W = 1,
  parameter int unsigned LBW   = NBRAM * PPW,                 // LB width in pixels
  parameter int unsigned SW    = (NBRAM > 1) ? $clog2(NBRAM) : 1,
  parameter int unsigned OW    = $clog2(PPW),
  parameter int unsigned RW    = $clog2(NBLK),
  parameter int unsigned LW    = (H > 1) ? $clog2(H) : 1
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 clear,
  // block and its placement
  input  logic                                 in_valid,
  input  logic [NBLK-1:0][PIX_W-1:0]           in_blk,
  input  logic [SW-1:0]                        in_start,
  input  logic [OW-1:0]                        in_offset,
  input  logic [RW-1:0]                        in_remain,
  input  logic                                 in_last,
  input  logic [LW-1:0]                        in_lb,
  input  logic [TAG_W-1:0]                     in_tag,
  // line-buffer write side
  output logic [H-1:0][NBRAM-1:0][W_BRAM-1:0] wr_data,
  output logic [H-1:0][NBRAM-1:0][PPW-1:0]    wr_mask,
  output logic [H-1:0][NBRAM-1:0]             wr_en,
  output logic [H-1:0][NBRAM-1:0]             addr_inc,
  output logic [H-1:0][NBRAM-1:0]             addr_rst,
  // context handed on to the read side, aligned with the write
  output logic                                 wr_valid,
  output logic [LW-1:0]                        wr_lb,
  output logic [SW-1:0]                        wr_start,
  output logic [OW-1:0]                        wr_offset,
  output logic [NBLK-1:0][PIX_W-1:0]           wr_blk,
  output logic [TAG_W-1:0]                     wr_tag
);
  typedef logic [LBW-1:0][PIX_W-1:0] lbvec_t;

  // ---------------- stage 0: input registers
  logic                       v0, last0;
  logic [NBLK-1:0][PIX_W-1:0] blk0;
  logic [SW-1:0]              s0;
  logic [OW-1:0]              off0;
  logic [RW-1:0]              rem0;
  logic [LW-1:0]              lb0;
  logic [TAG_W-1:0]           tag0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0 <= 1'b0; last0 <= 1'b0; blk0 <= '0; s0 <= '0; off0 <= '0;
      rem0 <= '0; lb0 <= '0; tag0 <= '0;
    end else begin
      v0 <= in_valid && !clear;
      last0 <= in_last; blk0 <= in_blk; s0 <= in_start; off0 <= in_offset;
      rem0 <= in_last ? in_remain : '0; lb0 <= in_lb; tag0 <= in_tag;
    end
  end

  // ---------------- stage 1: place-holder padding and remainder selection
  lbvec_t          pad_d, rem_d;
  logic [LBW-1:0]  pad_m, rem_m;

  always_comb begin
    pad_d = '0; pad_m = '0; rem_d = '0; rem_m = '0;
    for (int i = 0; i < NBLK; i++) begin
      pad_d[32'(off0) + i] = blk0[i];
      pad_m[32'(off0) + i] = 1'b1;
    end
    for (int i = 0; i < NBLK - 1; i++) begin
      if (i < 32'(rem0)) begin
        rem_d[i] = blk0[NBLK - 32'(rem0) + i];
        rem_m[i] = 1'b1;
      end
    end
  end

  logic                       v1, last1;
  lbvec_t                     pad_d1, rem_d1;
  logic [LBW-1:0]             pad_m1, rem_m1;
  logic [NBLK-1:0][PIX_W-1:0] blk1;
  logic [SW-1:0]              s1;
  logic [OW-1:0]              off1;
  logic [LW-1:0]              lb1;
  logic [TAG_W-1:0]           tag1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; last1 <= 1'b0; pad_d1 <= '0; rem_d1 <= '0; pad_m1 <= '0;
      rem_m1 <= '0; blk1 <= '0; s1 <= '0; off1 <= '0; lb1 <= '0; tag1 <= '0;
    end else begin
      v1 <= v0 && !clear;
      last1 <= last0; pad_d1 <= pad_d; rem_d1 <= rem_d; pad_m1 <= pad_m;
      rem_m1 <= rem_m; blk1 <= blk0; s1 <= s0; off1 <= off0; lb1 <= lb0;
      tag1 <= tag0;
    end
  end

  // ---------------- stage 2: circular right shift by whole BRAM widths
  lbvec_t          crs_d;
  logic [LBW-1:0]  crs_m;

  always_comb begin
    crs_d = '0; crs_m = '0;
    for (int j = 0; j < NBRAM; j++) begin
      int unsigned dst;
      dst = (j + 32'(s1)) % NBRAM;
      for (int p = 0; p < PPW; p++) begin
        crs_d[dst * PPW + p] = pad_d1[j * PPW + p];
        crs_m[dst * PPW + p] = pad_m1[j * PPW + p];
      end
    end
  end

  logic                       v2, last2;
  lbvec_t                     crs_d2, rem_d2;
  logic [LBW-1:0]             crs_m2, rem_m2;
  logic [NBLK-1:0][PIX_W-1:0] blk2;
  logic [SW-1:0]              s2;
  logic [OW-1:0]              off2;
  logic [LW-1:0]              lb2;
  logic [TAG_W-1:0]           tag2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; last2 <= 1'b0; crs_d2 <= '0; rem_d2 <= '0; crs_m2 <= '0;
      rem_m2 <= '0; blk2 <= '0; s2 <= '0; off2 <= '0; lb2 <= '0; tag2 <= '0;
    end else begin
      v2 <= v1 && !clear;
      last2 <= last1; crs_d2 <= crs_d; rem_d2 <= rem_d1; crs_m2 <= crs_m;
      rem_m2 <= rem_m1; blk2 <= blk1; s2 <= s1; off2 <= off1; lb2 <= lb1;
      tag2 <= tag1;
    end
  end

  // ---------------- output logic: route to the current and the next LB
  logic [LW-1:0] lb_next;
  assign lb_next = (32'(lb2) == H - 1) ? '0 : lb2 + 1'b1;

  always_comb begin
    for (int l = 0; l < H; l++) begin
      for (int b = 0; b < NBRAM; b++) begin
        wr_data[l][b] = '0;
        wr_mask[l][b] = '0;
        for (int p = 0; p < PPW; p++) begin
          if (32'(l) == 32'(lb2)) begin
            wr_data[l][b][PIX_W*p +: PIX_W] = crs_d2[b * PPW + p];
            wr_mask[l][b][p]                = crs_m2[b * PPW + p];
          end else if (32'(l) == 32'(lb_next)) begin
            wr_data[l][b][PIX_W*p +: PIX_W] = rem_d2[b * PPW + p];
            wr_mask[l][b][p]                = rem_m2[b * PPW + p];
          end
        end
        wr_en[l][b]    = v2 && (|wr_mask[l][b]);
        addr_inc[l][b] = v2 && wr_mask[l][b][PPW-1];
        addr_rst[l][b] = clear || (v2 && last2 && (32'(l) == 32'(lb2)));
      end
    end
  end

  assign wr_valid  = v2;
  assign wr_lb     = lb2;
  assign wr_start  = s2;
  assign wr_offset = off2;
  assign wr_blk    = blk2;
  assign wr_tag    = tag2;
endmodule
