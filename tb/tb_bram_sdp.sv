// tb_bram_sdp: checks the byte-masked simple dual-port RAM against an
// array model: random masked writes, one-cycle read latency, and read-first
// behaviour when reading the address being written.
module tb_bram_sdp;
  localparam int W = 64, D = 512, AW = 9;
  logic clk = 0;
  always #5 clk = ~clk;
  logic          wr_en = 0;
  logic [AW-1:0] wr_addr = 0, rd_addr = 0;
  logic [W-1:0]  wr_data = 0, rd_data;
  logic [W/8-1:0] wr_mask = 0;
  bram_sdp #(.W(W), .D(D)) dut (.*);

  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  initial begin
    logic [W-1:0] exp;
    // initialise through the write port
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_mask = '1; wr_data = {$urandom, $urandom};
      model[a] = wr_data;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      wr_en   = $urandom_range(1);
      wr_addr = AW'($urandom_range(15));
      wr_mask = 8'($urandom);
      wr_data = {$urandom, $urandom};
      rd_addr = ($urandom_range(3) == 0) ? wr_addr : AW'($urandom_range(15));
      exp = model[rd_addr];                       // read-first
      if (wr_en)
        for (int b = 0; b < W / 8; b++)
          if (wr_mask[b]) model[wr_addr][8*b +: 8] = wr_data[8*b +: 8];
      @(posedge clk); #1;
      checks++;
      if (rd_data !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", rd_addr, rd_data, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
