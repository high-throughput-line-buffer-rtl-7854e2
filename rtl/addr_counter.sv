// addr_counter: write-address register of one BRAM in a line buffer.
//
// The pixels of a line are written to a BRAM at consecutive addresses, so
// the address only ever moves forward by one or returns to zero. addr_rst
// clears it and has priority; addr_inc adds one. Both act at the next clock
// edge; wr_addr is the register itself.
module addr_counter #(
  parameter int unsigned AW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          addr_inc,
  input  logic          addr_rst,
  output logic [AW-1:0] wr_addr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        wr_addr <= '0;
    else if (addr_rst) wr_addr <= '0;
    else if (addr_inc) wr_addr <= wr_addr + 1'b1;
  end
endmodule
