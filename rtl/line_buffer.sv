// line_buffer: one line buffer (LB) of the D-SWIM buffer.
//
// An LB holds one image line, stored pixel x at linear position x across
// NBRAM block RAMs: position p lives in BRAM (p / 8) % NBRAM, word
// p / (8 * NBRAM), byte p % 8. Each BRAM has its own addr_counter that
// supplies the write address, because a pixel block that starts in the
// middle of the LB width reaches the next word in the BRAMs it wraps into.
// The controller drives the per-BRAM write data, byte masks, write enables
// and counter increment/reset; all BRAMs are read at rd_addr, which the
// buffer takes from the counters of the LB being written. Read data appear
// one cycle after the address. Write addresses are brought out (wr_addr)
// for the address multiplexer.
module line_buffer #(
  parameter int unsigned NBRAM = 3,
  parameter int unsigned W     = 64,
  parameter int unsigned D     = 512,
  parameter int unsigned AW    = $clog2(D)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NBRAM-1:0][W-1:0]     wr_data,
  input  logic [NBRAM-1:0][W/8-1:0]   wr_mask,
  input  logic [NBRAM-1:0]            wr_en,
  input  logic [NBRAM-1:0]            addr_inc,
  input  logic [NBRAM-1:0]            addr_rst,
  input  logic [NBRAM-1:0][AW-1:0]    rd_addr,
  output logic [NBRAM-1:0][W-1:0]     rd_data,
  output logic [NBRAM-1:0][AW-1:0]    wr_addr
);
  for (genvar b = 0; b < NBRAM; b++) begin : g_bram
    addr_counter #(.AW(AW)) u_cnt (
      .clk      (clk),
      .rst_n    (rst_n),
      .addr_inc (addr_inc[b]),
      .addr_rst (addr_rst[b]),
      .wr_addr  (wr_addr[b])
    );
    bram_sdp #(.W(W), .D(D), .AW(AW)) u_bram (
      .clk     (clk),
      .wr_en   (wr_en[b]),
      .wr_addr (wr_addr[b]),
      .wr_data (wr_data[b]),
      .wr_mask (wr_mask[b]),
      .rd_addr (rd_addr[b]),
      .rd_data (rd_data[b])
    );
  end
endmodule
