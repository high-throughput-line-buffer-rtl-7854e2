// tb_harris_rc: random gradient-matrix entries (including the extreme
// values of a 3x3 window of 8-bit gradients); R must equal
// sx*sy - sxy^2 - floor(3*(sx+sy)^2 / 64) and the flag R > threshold, two
// cycles after the input.
module tb_harris_rc;
  localparam int NBLK = 16, SUM_W = 21, R_W = 46, LAT = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [R_W-1:0] threshold;
  logic in_valid = 0, out_valid;
  logic signed [NBLK-1:0][SUM_W-1:0] in_sx = '0, in_sy = '0, in_sxy = '0;
  logic [15:0] in_line = 0, in_x = 0, out_line, out_x;
  logic signed [NBLK-1:0][R_W-1:0] out_r;
  logic [NBLK-1:0] out_corner;
  harris_rc #(.NBLK(NBLK), .SUM_W(SUM_W), .R_W(R_W)) dut (.*);
  int checks = 0, failures = 0, corners = 0;
  longint exp_r [300][NBLK];
  bit     exp_v [300];
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask
  initial begin
    threshold = 46'sd1000000;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if (n >= LAT) begin
        chk(out_valid == exp_v[n - LAT], "valid");
        if (exp_v[n - LAT]) begin
          chk(out_line == 16'(n - LAT), "side-band");
          for (int j = 0; j < NBLK; j++) begin
            chk(longint'($signed(out_r[j])) == exp_r[n - LAT][j],
                $sformatf("R %0d got %0d exp %0d", j, $signed(out_r[j]), exp_r[n - LAT][j]));
            chk(out_corner[j] == (exp_r[n - LAT][j] > longint'(threshold)), "corner flag");
            corners += int'(out_corner[j]);
          end
        end
      end
      in_valid = $urandom_range(3) != 0;
      in_line = 16'(n);
      for (int j = 0; j < NBLK; j++) begin
        longint a, b, c, t, q;
        a = (j == 0) ? 147456 : $urandom_range(147456);
        b = (j == 0) ? 147456 : $urandom_range(147456);
        c = (j == 1) ? -147456 : longint'($urandom_range(2 * 147456)) - 147456;
        in_sx[j] = SUM_W'(a); in_sy[j] = SUM_W'(b); in_sxy[j] = SUM_W'(c);
        t = a + b;
        q = 3 * t * t;
        exp_r[n][j] = a * b - c * c - (q >>> 6);
      end
      exp_v[n] = in_valid;
    end
    chk(corners > 0, "some corners flagged");
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
