// instr_mem: instruction memory of the D-SWIM buffer.
//
// Holds the periodic instruction list for the current image width, one
// 32-bit instruction per line of the period. The list never has more than
// N_blk entries, so DEPTH defaults to that. Instructions are written over
// the load bus one per clock (synchronous write); the controller reads
// asynchronously, which maps onto distributed RAM. Contents are cleared at
// reset so that an unprogrammed memory reads as zero.
module instr_mem #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned IW    = 32,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [IW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [IW-1:0] rdata
);
  logic [IW-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we && (32'(waddr) < DEPTH)) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = (32'(raddr) < DEPTH) ? mem[raddr] : '0;
endmodule
