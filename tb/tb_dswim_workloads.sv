// tb_dswim_workloads: runs the buffer configurations and image sizes of the
// evaluation through buffers built with the matching parameters, all with
// N_line_max = 4096.
//
// Buffer configurations (image width, H, N_blk):
//   C1 630/3/8   C2 630/3/16   C3 1020/3/16   C4 1020/3/32
//   C5 1020/5/16 C6 1375/5/16
// streamed with a height of two instruction periods plus H lines.
// Full images for the programming/computation comparison:
//   431x392 and 1342x638, each at N_blk = 8, 16 and 32 (H = 3).
// For each run the programming time must equal the length of the
// instruction list (one instruction per cycle: 8/16/32 for width 431,
// 4/8/16 for width 1342) and the computation time the number of blocks.
// All windows are checked against the image.
module tb_dswim_workloads;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  localparam int N = 12;
  logic       done [N];
  int         chk  [N], fl [N], pc [N], cc [N], ll [N];
  string      name [N] = '{"C1 630/H3/N8", "C2 630/H3/N16", "C3 1020/H3/N16", "C4 1020/H3/N32",
                           "C5 1020/H5/N16", "C6 1375/H5/N16",
                           "431x392 N8", "431x392 N16", "431x392 N32",
                           "1342x638 N8", "1342x638 N16", "1342x638 N32"};
  // programming cycles expected from the instruction-list length
  int         exp_pc [N] = '{4, 8, 4, 8, 4, 16, 8, 16, 32, 4, 8, 16};

  dswim_runner #(.H(3), .NBLK(8),  .W(630),  .HT(11)) r0  (.clk, .rst_n, .start, .done(done[0]),  .checks(chk[0]),  .failures(fl[0]),  .prog_cycles(pc[0]),  .comp_cycles(cc[0]),  .list_len(ll[0]));
  dswim_runner #(.H(3), .NBLK(16), .W(630),  .HT(19)) r1  (.clk, .rst_n, .start, .done(done[1]),  .checks(chk[1]),  .failures(fl[1]),  .prog_cycles(pc[1]),  .comp_cycles(cc[1]),  .list_len(ll[1]));
  dswim_runner #(.H(3), .NBLK(16), .W(1020), .HT(19)) r2  (.clk, .rst_n, .start, .done(done[2]),  .checks(chk[2]),  .failures(fl[2]),  .prog_cycles(pc[2]),  .comp_cycles(cc[2]),  .list_len(ll[2]));
  dswim_runner #(.H(3), .NBLK(32), .W(1020), .HT(19)) r3  (.clk, .rst_n, .start, .done(done[3]),  .checks(chk[3]),  .failures(fl[3]),  .prog_cycles(pc[3]),  .comp_cycles(cc[3]),  .list_len(ll[3]));
  dswim_runner #(.H(5), .NBLK(16), .W(1020), .HT(21)) r4  (.clk, .rst_n, .start, .done(done[4]),  .checks(chk[4]),  .failures(fl[4]),  .prog_cycles(pc[4]),  .comp_cycles(cc[4]),  .list_len(ll[4]));
  dswim_runner #(.H(5), .NBLK(16), .W(1375), .HT(37)) r5  (.clk, .rst_n, .start, .done(done[5]),  .checks(chk[5]),  .failures(fl[5]),  .prog_cycles(pc[5]),  .comp_cycles(cc[5]),  .list_len(ll[5]));
  dswim_runner #(.H(3), .NBLK(8),  .W(431),  .HT(392)) r6  (.clk, .rst_n, .start, .done(done[6]),  .checks(chk[6]),  .failures(fl[6]),  .prog_cycles(pc[6]),  .comp_cycles(cc[6]),  .list_len(ll[6]));
  dswim_runner #(.H(3), .NBLK(16), .W(431),  .HT(392)) r7  (.clk, .rst_n, .start, .done(done[7]),  .checks(chk[7]),  .failures(fl[7]),  .prog_cycles(pc[7]),  .comp_cycles(cc[7]),  .list_len(ll[7]));
  dswim_runner #(.H(3), .NBLK(32), .W(431),  .HT(392)) r8  (.clk, .rst_n, .start, .done(done[8]),  .checks(chk[8]),  .failures(fl[8]),  .prog_cycles(pc[8]),  .comp_cycles(cc[8]),  .list_len(ll[8]));
  dswim_runner #(.H(3), .NBLK(8),  .W(1342), .HT(638)) r9  (.clk, .rst_n, .start, .done(done[9]),  .checks(chk[9]),  .failures(fl[9]),  .prog_cycles(pc[9]),  .comp_cycles(cc[9]),  .list_len(ll[9]));
  dswim_runner #(.H(3), .NBLK(16), .W(1342), .HT(638)) r10 (.clk, .rst_n, .start, .done(done[10]), .checks(chk[10]), .failures(fl[10]), .prog_cycles(pc[10]), .comp_cycles(cc[10]), .list_len(ll[10]));
  dswim_runner #(.H(3), .NBLK(32), .W(1342), .HT(638)) r11 (.clk, .rst_n, .start, .done(done[11]), .checks(chk[11]), .failures(fl[11]), .prog_cycles(pc[11]), .comp_cycles(cc[11]), .list_len(ll[11]));

  int checks = 0, failures = 0;

  function automatic bit all_done();
    for (int i = 0; i < N; i++) if (!done[i]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    while (!all_done()) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      checks += chk[i] + 1;
      failures += fl[i];
      if (pc[i] != exp_pc[i] || ll[i] != exp_pc[i]) begin
        failures++;
        $display("FAIL %s: programming %0d cycles, expected %0d", name[i], pc[i], exp_pc[i]);
      end
      $display("%-16s instructions=%0d programming=%0d cycles computation=%0d cycles checks=%0d failures=%0d",
               name[i], ll[i], pc[i], cc[i], chk[i], fl[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
