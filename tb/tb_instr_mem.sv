// tb_instr_mem: the memory reads zero after reset, returns what was written
// one word per cycle, and ignores writes while we is low.
module tb_instr_mem;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  instr_mem #(.DEPTH(DEPTH)) dut (.*);
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;
  task automatic chk(logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL got %h exp %h", got, exp);
    end
  endtask
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = 4'(i); #1; chk(rdata, 32'h0); model[i] = 0;
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = $urandom_range(1); waddr = 4'($urandom); wdata = $urandom;
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 0;
      raddr = 4'($urandom); #1;
      chk(rdata, model[raddr]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
