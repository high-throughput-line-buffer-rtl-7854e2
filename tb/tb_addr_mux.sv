// tb_addr_mux: random write-address sets; the output must equal the set of
// the selected line buffer.
module tb_addr_mux;
  localparam int H = 3, NBRAM = 3, AW = 9;
  logic [H-1:0][NBRAM-1:0][AW-1:0] wr_addr;
  logic [1:0] addr_sel;
  logic [NBRAM-1:0][AW-1:0] rd_addr;
  addr_mux #(.H(H), .NBRAM(NBRAM), .AW(AW)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int l = 0; l < H; l++)
        for (int b = 0; b < NBRAM; b++) wr_addr[l][b] = AW'($urandom);
      addr_sel = 2'($urandom_range(H - 1));
      #1;
      for (int b = 0; b < NBRAM; b++) begin
        checks++;
        if (rd_addr[b] != wr_addr[addr_sel][b]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
