// tb_addr_counter: random increment/reset sequences against a software
// counter; reset must win over increment and the count wraps at 2^AW.
module tb_addr_counter;
  localparam int AW = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic addr_inc = 0, addr_rst = 0;
  logic [AW-1:0] wr_addr;
  addr_counter #(.AW(AW)) dut (.*);
  int checks = 0, failures = 0, model = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (wr_addr != AW'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL got %0d exp %0d", wr_addr, model);
      end
      addr_inc = $urandom_range(3) != 0;
      addr_rst = $urandom_range(40) == 0;
      if (addr_rst) model = 0;
      else if (addr_inc) model = (model + 1) % (1 << AW);
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
