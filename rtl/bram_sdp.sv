// bram_sdp: simple dual-port block RAM with a byte-wise write enable.
//
// This is the storage element of a line buffer: one write port and one read
// port on the same clock, D words of W bits, and one write-enable bit per byte
// (wr_mask) so that a pixel block that is not aligned to a word boundary can
// be stored without disturbing the other pixels of the same word. The read is
// synchronous with one cycle of latency and returns the word as it was before
// a write to the same address in the same cycle (read-first); the line buffer
// relies on this only for very short lines. The array is not reset.
module bram_sdp #(
  parameter int unsigned W  = 64,
  parameter int unsigned D  = 512,
  parameter int unsigned AW = $clog2(D)
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  logic [W-1:0]      wr_data,
  input  logic [W/8-1:0]    wr_mask,
  input  logic [AW-1:0]     rd_addr,
  output logic [W-1:0]      rd_data
);
  logic [W-1:0] mem [D];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int b = 0; b < W / 8; b++)
        if (wr_mask[b]) mem[wr_addr][8*b +: 8] <= wr_data[8*b +: 8];
    end
    rd_data <= mem[rd_addr];
  end
endmodule
