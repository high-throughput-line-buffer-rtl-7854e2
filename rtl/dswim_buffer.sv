// dswim_buffer: the D-SWIM dynamically programmable line buffer.
//
// Accepts an image as a stream of N_blk-pixel blocks (one per cycle, lines
// packed back to back, so a block may hold the end of one line and the start
// of the next) and produces, for every block, an H x N_blk window holding the
// block and the pixels directly above it in the H-1 previous lines. Any image
// width up to NLINE_MAX is handled without resynthesis: the width only
// changes the instruction list, which is loaded over the instruction bus one
// word per cycle, followed by a write of the image height that arms the
// buffer for the next image.
//
// Structure: instruction memory -> controller (decoder, buffer-write logic,
// buffer-read logic) -> H line buffers of NBRAM 64-bit BRAMs each, with one
// address counter per BRAM; the address multiplexer sends the write
// addresses of the LB being written to all LBs as read addresses.
// NBRAM follows the sizing rule max(capacity bound, port-width bound),
// giving 3 BRAMs per LB for N_blk = 16. N_blk must be a multiple of the 8
// pixels of a BRAM word (checked at elaboration).
//
// Timing: the window for a block appears 7 cycles after the block is
// accepted, together with out_line/out_x/out_last. Window rows whose line
// index is below H-1 are not meaningful (top border), and neither are the
// window columns of a line-end block that lie beyond the end of the line,
// except where the earlier lines ended with at least as many pixels of
// their next line.
module dswim_buffer
  import dswim_pkg::*;
#(
  parameter int unsigned H         = 3,
  parameter int unsigned NBLK      = 16,
  parameter int unsigned NLINE_MAX = 4096,
  parameter int unsigned NBRAM     = calc_nbram(NLINE_MAX, NBLK),
  parameter int unsigned IDEPTH    = NBLK,
  parameter int unsigned IAW       = (IDEPTH > 1) ? $clog2(IDEPTH) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // instruction load bus and height register
  input  logic                               inst_we,
  input  logic [IAW-1:0]                     inst_addr,
  input  logic [INSTR_W-1:0]                 inst_data,
  input  logic                               cfg_we,
  input  logic [15:0]                        cfg_height,
  // input stream
  input  logic                               in_valid,
  output logic                               in_ready,
  input  logic [NBLK-1:0][PIX_W-1:0]         in_blk,
  // output window
  output logic                               out_valid,
  output logic [H-1:0][NBLK-1:0][PIX_W-1:0] out_win,
  output logic [15:0]                        out_line,
  output logic [15:0]                        out_x,
  output logic                               out_last
);
  localparam int unsigned AW = $clog2(D_BRAM);
  localparam int unsigned LW = (H > 1) ? $clog2(H) : 1;

  // Every block of a line must share one offset inside a BRAM word, so a
  // block has to cover whole BRAM words.
  if (NBLK % PPW != 0) begin : g_nblk_check
    $error("NBLK must be a multiple of %0d pixels", PPW);
  end

  logic [IAW-1:0]     instr_addr;
  logic [INSTR_W-1:0] instr_data;

  logic [H-1:0][NBRAM-1:0][W_BRAM-1:0] wr_data, rd_data;
  logic [H-1:0][NBRAM-1:0][PPW-1:0]    wr_mask;
  logic [H-1:0][NBRAM-1:0]             wr_en, addr_inc, addr_rst;
  logic [H-1:0][NBRAM-1:0][AW-1:0]     wr_addr;
  logic [NBRAM-1:0][AW-1:0]            rd_addr;
  logic [LW-1:0]                       addr_sel;

  instr_mem #(.DEPTH(IDEPTH), .IW(INSTR_W), .AW(IAW)) u_imem (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (inst_we),
    .waddr (inst_addr),
    .wdata (inst_data),
    .raddr (instr_addr),
    .rdata (instr_data)
  );

  dswim_controller #(.H(H), .NBLK(NBLK), .NLINE_MAX(NLINE_MAX), .NBRAM(NBRAM),
                     .IDEPTH(IDEPTH)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg_we     (cfg_we),
    .cfg_height (cfg_height),
    .instr_addr (instr_addr),
    .instr_data (instr_data),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .in_blk     (in_blk),
    .wr_data    (wr_data),
    .wr_mask    (wr_mask),
    .wr_en      (wr_en),
    .addr_inc   (addr_inc),
    .addr_rst   (addr_rst),
    .addr_sel   (addr_sel),
    .rd_data    (rd_data),
    .out_valid  (out_valid),
    .out_win    (out_win),
    .out_line   (out_line),
    .out_x      (out_x),
    .out_last   (out_last)
  );

  for (genvar l = 0; l < H; l++) begin : g_lb
    line_buffer #(.NBRAM(NBRAM), .W(W_BRAM), .D(D_BRAM), .AW(AW)) u_lb (
      .clk      (clk),
      .rst_n    (rst_n),
      .wr_data  (wr_data[l]),
      .wr_mask  (wr_mask[l]),
      .wr_en    (wr_en[l]),
      .addr_inc (addr_inc[l]),
      .addr_rst (addr_rst[l]),
      .rd_addr  (rd_addr),
      .rd_data  (rd_data[l]),
      .wr_addr  (wr_addr[l])
    );
  end

  addr_mux #(.H(H), .NBRAM(NBRAM), .AW(AW), .SW(LW)) u_amux (
    .wr_addr  (wr_addr),
    .addr_sel (addr_sel),
    .rd_addr  (rd_addr)
  );

  // Instructions are loaded between images, never while one streams.
  a_load_idle: assert property (@(posedge clk) disable iff (!rst_n)
    inst_we |-> !in_ready);
endmodule
