// tb_line_buffer: writes a line of pixels into one line buffer the way the
// controller does (blocks of 16 pixels at a running linear position, byte
// masks, counter increment when a BRAM word is completed), then reads every
// word back, first at one address for all BRAMs and then at a different
// address in each BRAM, and compares with the linear layout
// position p -> BRAM (p/8)%3, word p/24, byte p%8. Also checks that the
// counters return to zero on reset.
module tb_line_buffer;
  localparam int NBRAM = 3, W = 64, AW = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NBRAM-1:0][W-1:0]   wr_data = '0, rd_data;
  logic [NBRAM-1:0][W/8-1:0] wr_mask = '0;
  logic [NBRAM-1:0]          wr_en = '0, addr_inc = '0, addr_rst = '0;
  logic [NBRAM-1:0][AW-1:0]  rd_addr = '0, wr_addr;
  line_buffer #(.NBRAM(NBRAM)) dut (.*);
  int checks = 0, failures = 0;
  byte unsigned line[200];

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    int p;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (line[i]) line[i] = 8'($urandom);
    p = 5;                                        // start at an unaligned offset
    while (p + 16 <= 200) begin
      @(negedge clk);
      wr_data = '0; wr_mask = '0;
      for (int i = 0; i < 16; i++) begin
        int q;
        q = p + i;
        wr_data[(q / 8) % NBRAM][8 * (q % 8) +: 8] = line[q];
        wr_mask[(q / 8) % NBRAM][q % 8] = 1'b1;
      end
      for (int b = 0; b < NBRAM; b++) begin
        wr_en[b] = |wr_mask[b];
        addr_inc[b] = wr_mask[b][7];
      end
      p += 16;
    end
    @(negedge clk);
    wr_en = '0; addr_inc = '0;
    // read back positions 5 .. p-1
    for (int a = 0; a < 8; a++) begin
      for (int b = 0; b < NBRAM; b++) rd_addr[b] = AW'(a);
      @(negedge clk);
      for (int b = 0; b < NBRAM; b++)
        for (int k = 0; k < 8; k++) begin
          int q;
          q = a * 24 + b * 8 + k;
          if (q >= 5 && q < p)
            chk(rd_data[b][8 * k +: 8] == line[q], $sformatf("pos %0d", q));
        end
    end
    // read again with a different address in every BRAM
    for (int a = 0; a < 8; a++) begin
      for (int b = 0; b < NBRAM; b++) rd_addr[b] = AW'((a + 3 * b) % 8);
      @(negedge clk);
      for (int b = 0; b < NBRAM; b++)
        for (int k = 0; k < 8; k++) begin
          int q;
          q = ((a + 3 * b) % 8) * 24 + b * 8 + k;
          if (q >= 5 && q < p)
            chk(rd_data[b][8 * k +: 8] == line[q], $sformatf("pos %0d, independent addresses", q));
        end
    end
    chk(wr_addr[0] != 0, "counters advanced");
    addr_rst = '1;
    @(negedge clk);
    addr_rst = '0;
    for (int b = 0; b < NBRAM; b++) chk(wr_addr[b] == 0, "counter reset");
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
