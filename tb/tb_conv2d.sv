// tb_conv2d: feeds random 3x16 windows (with gaps) and random signed
// weights; each result must equal the 3x3 weighted sum over the window
// columns j-2..j of the concatenation of the previous valid window's last
// two columns and the current window, one cycle after the input.
module tb_conv2d;
  localparam int H = 3, KW = 3, NBLK = 16, ACC_W = 21;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [H-1:0][KW-1:0][7:0] weights;
  logic in_valid = 0, in_last = 0, out_valid, out_last;
  logic [H-1:0][NBLK-1:0][7:0] in_win = '0;
  logic [15:0] in_line = 0, in_x = 0, out_line, out_x;
  logic signed [NBLK-1:0][ACC_W-1:0] out_blk;
  conv2d #(.H(H), .KW(KW), .NBLK(NBLK), .ACC_W(ACC_W)) dut (.*);
  int checks = 0, failures = 0;
  int prev [H][2];
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin
    for (int r = 0; r < H; r++) for (int c = 0; c < KW; c++) weights[r][c] = 8'($urandom);
    for (int r = 0; r < H; r++) begin prev[r][0] = 0; prev[r][1] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      int cols [H][NBLK + 2];
      int exp [NBLK];
      @(negedge clk);
      in_valid = $urandom_range(3) != 0;
      in_line = 16'($urandom); in_x = 16'($urandom); in_last = 1'($urandom);
      for (int r = 0; r < H; r++) for (int i = 0; i < NBLK; i++) in_win[r][i] = 8'($urandom);
      for (int r = 0; r < H; r++) begin
        cols[r][0] = prev[r][0]; cols[r][1] = prev[r][1];
        for (int i = 0; i < NBLK; i++) cols[r][i + 2] = int'(in_win[r][i]);
      end
      for (int j = 0; j < NBLK; j++) begin
        exp[j] = 0;
        for (int r = 0; r < H; r++)
          for (int c = 0; c < KW; c++) exp[j] += cols[r][j + c] * int'($signed(weights[r][c]));
      end
      @(posedge clk); #1;
      chk(out_valid == in_valid, "valid");
      if (in_valid) begin
        for (int j = 0; j < NBLK; j++) chk(int'($signed(out_blk[j])) == exp[j], $sformatf("window %0d", j));
        chk(out_line == in_line && out_x == in_x && out_last == in_last, "side-band");
        for (int r = 0; r < H; r++) begin
          prev[r][0] = int'(in_win[r][NBLK - 2]); prev[r][1] = int'(in_win[r][NBLK - 1]);
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
