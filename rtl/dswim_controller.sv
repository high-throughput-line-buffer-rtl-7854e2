// dswim_controller: Controller of the D-SWIM line buffer.
//
// Decodes the instruction of the current image line and sequences the
// blocks of the line through the write and read logic:
//  * Decoder registers hold START, OFFSET, REMAIN, CYCLE and RETURN of the
//    current line. A block counter counts the CYCLE blocks of the line; the
//    BRAM index where block k starts is START + k*N_blk/8 (mod NBRAM),
//    kept incrementally.
//  * After the last block of a line the next instruction is fetched (back
//    to instruction 0 when RETURN is set), the line index advances and the
//    current LB rolls to the next one (line rolling, modulo H).
//  * After N_height lines the image is complete and the controller stops
//    accepting blocks (in_ready low) until it is armed again.
// Arming: a write to the height register (cfg_we) loads N_height, fetches
// instruction 0, resets every address counter and starts a new image at
// LB 0. The instruction list must be in the instruction memory by then.
//
// Stream interface: a block is accepted in every cycle with in_valid and
// in_ready; gaps are allowed. The output window for a block appears
// LATENCY = 7 cycles after acceptance (3 write stages, 1 BRAM read, 3 read
// stages), with out_line (line index of the block within the image), out_x
// (x of the block's first pixel in that line) and out_last (the block ends
// the line and carries pixels of the next one). Rows of the window whose
// line index is below H-1 hold data of the previous image. The side-band
// outputs and the arming protocol are this design's own choices.
module dswim_controller
  import dswim_pkg::*;
#(
  parameter int unsigned H         = 3,
  parameter int unsigned NBLK      = 16,
  parameter int unsigned NLINE_MAX = 4096,
  parameter int unsigned NBRAM     = calc_nbram(NLINE_MAX, NBLK),
  parameter int unsigned IDEPTH    = NBLK,
  parameter int unsigned SW        = (NBRAM > 1) ? $clog2(NBRAM) : 1,
  parameter int unsigned LW        = (H > 1) ? $clog2(H) : 1,
  parameter int unsigned IAW       = (IDEPTH > 1) ? $clog2(IDEPTH) : 1
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // configuration
  input  logic                                 cfg_we,
  input  logic [15:0]                          cfg_height,
  output logic [IAW-1:0]                       instr_addr,
  input  logic [INSTR_W-1:0]                   instr_data,
  // input stream
  input  logic                                 in_valid,
  output logic                                 in_ready,
  input  logic [NBLK-1:0][PIX_W-1:0]           in_blk,
  // line buffers
  output logic [H-1:0][NBRAM-1:0][W_BRAM-1:0] wr_data,
  output logic [H-1:0][NBRAM-1:0][PPW-1:0]    wr_mask,
  output logic [H-1:0][NBRAM-1:0]             wr_en,
  output logic [H-1:0][NBRAM-1:0]             addr_inc,
  output logic [H-1:0][NBRAM-1:0]             addr_rst,
  output logic [LW-1:0]                        addr_sel,
  input  logic [H-1:0][NBRAM-1:0][W_BRAM-1:0] rd_data,
  // output window
  output logic                                 out_valid,
  output logic [H-1:0][NBLK-1:0][PIX_W-1:0]   out_win,
  output logic [15:0]                          out_line,
  output logic [15:0]                          out_x,
  output logic                                 out_last
);
  localparam int unsigned OW    = $clog2(PPW);
  localparam int unsigned RW    = $clog2(NBLK);
  localparam int unsigned TAG_W = 33;
  localparam int unsigned STEP  = NBLK / PPW;   // BRAMs covered by one block
  localparam int unsigned F_SW  = start_w(NBRAM);
  localparam int unsigned F_OW  = offset_w();
  localparam int unsigned F_RW  = remain_w(NBLK);
  localparam int unsigned F_CW  = cycle_w(NLINE_MAX, NBLK);

  // ---------------- decoder registers and sequencing state
  instr_t          cur;
  logic [IAW-1:0]  pc;
  logic [15:0]     k, y, x, height;
  logic [SW-1:0]   s;
  logic [LW-1:0]   lb;
  logic            active;
  instr_t          nxt;
  logic [IAW-1:0]  pc_next;
  logic            accept, last_blk;

  assign accept   = in_valid && active;
  assign last_blk = (k + 16'd1 >= cur.cycles);
  assign in_ready = active;

  always_comb begin
    if (cfg_we)       pc_next = '0;
    else if (cur.ret) pc_next = '0;
    else              pc_next = pc + 1'b1;
  end
  assign instr_addr = pc_next;
  assign nxt        = decode_instr(instr_data, F_SW, F_OW, F_RW, F_CW);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur <= '0; pc <= '0; k <= '0; y <= '0; x <= '0; height <= '0;
      s <= '0; lb <= '0; active <= 1'b0;
    end else if (cfg_we) begin
      cur    <= nxt;
      pc     <= '0;
      k      <= '0;
      y      <= '0;
      x      <= nxt.start * 16'(PPW) + nxt.offset;
      s      <= SW'(nxt.start);
      lb     <= '0;
      height <= cfg_height;
      active <= (cfg_height != 16'd0);
    end else if (accept) begin
      if (last_blk) begin
        cur <= nxt;
        pc  <= pc_next;
        k   <= '0;
        y   <= y + 16'd1;
        x   <= nxt.start * 16'(PPW) + nxt.offset;
        s   <= SW'(nxt.start);
        lb  <= (32'(lb) == H - 1) ? '0 : lb + 1'b1;
        if (y + 16'd1 >= height) active <= 1'b0;
      end else begin
        k <= k + 16'd1;
        x <= x + 16'(NBLK);
        s <= (32'(s) + STEP >= NBRAM) ? SW'(32'(s) + STEP - NBRAM) : SW'(32'(s) + STEP);
      end
    end
  end

  // ---------------- write side
  logic                       w_valid;
  logic [LW-1:0]              w_lb;
  logic [SW-1:0]              w_start;
  logic [OW-1:0]              w_offset;
  logic [NBLK-1:0][PIX_W-1:0] w_blk;
  logic [TAG_W-1:0]           w_tag;

  dswim_wr_logic #(.H(H), .NBLK(NBLK), .NBRAM(NBRAM), .TAG_W(TAG_W)) u_wr (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (cfg_we),
    .in_valid  (accept),
    .in_blk    (in_blk),
    .in_start  (s),
    .in_offset (OW'(cur.offset)),
    .in_remain (RW'(cur.remain)),
    .in_last   (last_blk),
    .in_lb     (lb),
    .in_tag    ({y, x, last_blk}),
    .wr_data   (wr_data),
    .wr_mask   (wr_mask),
    .wr_en     (wr_en),
    .addr_inc  (addr_inc),
    .addr_rst  (addr_rst),
    .wr_valid  (w_valid),
    .wr_lb     (w_lb),
    .wr_start  (w_start),
    .wr_offset (w_offset),
    .wr_blk    (w_blk),
    .wr_tag    (w_tag)
  );
  assign addr_sel = w_lb;

  // ---------------- one cycle of BRAM read latency
  logic                       r_valid;
  logic [LW-1:0]              r_lb;
  logic [SW-1:0]              r_start;
  logic [OW-1:0]              r_offset;
  logic [NBLK-1:0][PIX_W-1:0] r_blk;
  logic [TAG_W-1:0]           r_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid <= 1'b0; r_lb <= '0; r_start <= '0; r_offset <= '0;
      r_blk <= '0; r_tag <= '0;
    end else begin
      r_valid <= w_valid; r_lb <= w_lb; r_start <= w_start;
      r_offset <= w_offset; r_blk <= w_blk; r_tag <= w_tag;
    end
  end

  // ---------------- read side
  logic [TAG_W-1:0] o_tag;

  dswim_rd_logic #(.H(H), .NBLK(NBLK), .NBRAM(NBRAM), .TAG_W(TAG_W)) u_rd (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (r_valid),
    .in_lb     (r_lb),
    .in_start  (r_start),
    .in_offset (r_offset),
    .in_blk    (r_blk),
    .in_tag    (r_tag),
    .rd_data   (rd_data),
    .out_valid (out_valid),
    .out_win   (out_win),
    .out_tag   (o_tag)
  );
  assign {out_line, out_x, out_last} = o_tag;

  // A line must have at least one block.
  a_cycles_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    accept |-> (cur.cycles != 16'd0));
endmodule
