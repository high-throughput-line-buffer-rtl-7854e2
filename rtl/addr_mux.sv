// addr_mux: read-address multiplexer of the D-SWIM buffer.
//
// All line buffers are read at the same positions as the block being
// written, so the write addresses of the LB selected by addr_sel (the LB
// that receives the current input block) are broadcast as the read
// addresses of every LB. Purely combinational; an out-of-range select
// gives the addresses of LB 0.
module addr_mux #(
  parameter int unsigned H     = 3,
  parameter int unsigned NBRAM = 3,
  parameter int unsigned AW    = 9,
  parameter int unsigned SW    = (H > 1) ? $clog2(H) : 1
) (
  input  logic [H-1:0][NBRAM-1:0][AW-1:0] wr_addr,
  input  logic [SW-1:0]                   addr_sel,
  output logic [NBRAM-1:0][AW-1:0]        rd_addr
);
  always_comb begin
    rd_addr = wr_addr[0];
    for (int i = 1; i < H; i++)
      if (addr_sel == SW'(i)) rd_addr = wr_addr[i];
  end
endmodule
