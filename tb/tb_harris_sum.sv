// tb_harris_sum: random signed windows A and B (with gaps); each output
// must be the sum of a*b over the 3x3 window ending in its column, using the
// last two columns of the previous valid input at the left edge.
module tb_harris_sum;
  localparam int H = 3, KW = 3, NBLK = 16, SUM_W = 21;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, out_valid;
  logic signed [H-1:0][NBLK-1:0][7:0] in_a = '0, in_b = '0;
  logic [15:0] in_line = 0, in_x = 0, out_line, out_x;
  logic signed [NBLK-1:0][SUM_W-1:0] out_sum;
  harris_sum #(.H(H), .KW(KW), .NBLK(NBLK), .SUM_W(SUM_W)) dut (.*);
  int checks = 0, failures = 0;
  int pa [H][2], pb [H][2];
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin
    for (int r = 0; r < H; r++) begin pa[r] = '{0, 0}; pb[r] = '{0, 0}; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int ca [H][NBLK + 2], cb [H][NBLK + 2];
      int exp [NBLK];
      @(negedge clk);
      in_valid = $urandom_range(3) != 0;
      in_line = 16'($urandom); in_x = 16'($urandom);
      for (int r = 0; r < H; r++)
        for (int i = 0; i < NBLK; i++) begin
          in_a[r][i] = ($urandom_range(9) == 0) ? -8'sd128 : 8'($urandom);
          in_b[r][i] = ($urandom_range(9) == 0) ? -8'sd128 : 8'($urandom);
        end
      for (int r = 0; r < H; r++) begin
        ca[r][0] = pa[r][0]; ca[r][1] = pa[r][1]; cb[r][0] = pb[r][0]; cb[r][1] = pb[r][1];
        for (int i = 0; i < NBLK; i++) begin
          ca[r][i + 2] = int'($signed(in_a[r][i])); cb[r][i + 2] = int'($signed(in_b[r][i]));
        end
      end
      for (int j = 0; j < NBLK; j++) begin
        exp[j] = 0;
        for (int r = 0; r < H; r++)
          for (int c = 0; c < KW; c++) exp[j] += ca[r][j + c] * cb[r][j + c];
      end
      @(posedge clk); #1;
      chk(out_valid == in_valid, "valid");
      if (in_valid) begin
        for (int j = 0; j < NBLK; j++) chk(int'($signed(out_sum[j])) == exp[j], $sformatf("sum %0d", j));
        chk(out_line == in_line && out_x == in_x, "side-band");
        for (int r = 0; r < H; r++) begin
          pa[r][0] = int'($signed(in_a[r][NBLK - 2])); pa[r][1] = int'($signed(in_a[r][NBLK - 1]));
          pb[r][0] = int'($signed(in_b[r][NBLK - 2])); pb[r][1] = int'($signed(in_b[r][NBLK - 1]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
