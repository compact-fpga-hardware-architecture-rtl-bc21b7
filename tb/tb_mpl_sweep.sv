// tb_mpl_sweep: runs the MPL exponentiator over the part of the published
// size sweep (digit size k against operand size N) that simulates in
// reasonable time, one instance per configuration, all in parallel:
//   N = 256  : k = 2, 4, 8, 16, 32, 64
//   N = 512  : k = 4, 8, 16, 32, 64
//   N = 1024 : k = 8
//   N = 2048 : k = 16, 32
// The remaining points (N = 512 with k = 2, N = 1024 with k < 8, N = 2048
// with k < 16) need from 34 million up to billions of cycles and are left
// out; k = 16, 32, 64 at N = 1024 and k = 64 at N = 2048 are the published
// comparison points, run by tb_mpl_workloads. Each run is
// checked for the correct result and the exact cycle count, including the
// point k = 64, N = 256 (n = 4 digits), whose products use idle slots.
module tb_mpl_sweep;
  localparam int NCFG = 14;
  logic clk = 0, rst_n = 0;
  logic fin [NCFG];
  int   chk [NCFG], fail [NCFG], cyc [NCFG];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  mpl_wl_runner #(.K(2),  .N(256)) u_k2_n256   (.clk, .rst_n, .finished(fin[0]), .checks(chk[0]), .failures(fail[0]), .cycles(cyc[0]));
  mpl_wl_runner #(.K(4),  .N(256)) u_k4_n256   (.clk, .rst_n, .finished(fin[1]), .checks(chk[1]), .failures(fail[1]), .cycles(cyc[1]));
  mpl_wl_runner #(.K(8),  .N(256)) u_k8_n256   (.clk, .rst_n, .finished(fin[2]), .checks(chk[2]), .failures(fail[2]), .cycles(cyc[2]));
  mpl_wl_runner #(.K(16), .N(256)) u_k16_n256  (.clk, .rst_n, .finished(fin[3]), .checks(chk[3]), .failures(fail[3]), .cycles(cyc[3]));
  mpl_wl_runner #(.K(32), .N(256)) u_k32_n256  (.clk, .rst_n, .finished(fin[4]), .checks(chk[4]), .failures(fail[4]), .cycles(cyc[4]));
  mpl_wl_runner #(.K(64), .N(256)) u_k64_n256  (.clk, .rst_n, .finished(fin[5]), .checks(chk[5]), .failures(fail[5]), .cycles(cyc[5]));
  mpl_wl_runner #(.K(8),  .N(512)) u_k8_n512   (.clk, .rst_n, .finished(fin[6]), .checks(chk[6]), .failures(fail[6]), .cycles(cyc[6]));
  mpl_wl_runner #(.K(16), .N(512)) u_k16_n512  (.clk, .rst_n, .finished(fin[7]), .checks(chk[7]), .failures(fail[7]), .cycles(cyc[7]));
  mpl_wl_runner #(.K(32), .N(512)) u_k32_n512  (.clk, .rst_n, .finished(fin[8]), .checks(chk[8]), .failures(fail[8]), .cycles(cyc[8]));
  mpl_wl_runner #(.K(64), .N(512)) u_k64_n512  (.clk, .rst_n, .finished(fin[9]), .checks(chk[9]), .failures(fail[9]), .cycles(cyc[9]));
  mpl_wl_runner #(.K(4),  .N(512)) u_k4_n512   (.clk, .rst_n, .finished(fin[10]), .checks(chk[10]), .failures(fail[10]), .cycles(cyc[10]));
  mpl_wl_runner #(.K(8),  .N(1024)) u_k8_n1024 (.clk, .rst_n, .finished(fin[11]), .checks(chk[11]), .failures(fail[11]), .cycles(cyc[11]));
  mpl_wl_runner #(.K(16), .N(2048)) u_k16_n2048 (.clk, .rst_n, .finished(fin[12]), .checks(chk[12]), .failures(fail[12]), .cycles(cyc[12]));
  mpl_wl_runner #(.K(32), .N(2048)) u_k32_n2048 (.clk, .rst_n, .finished(fin[13]), .checks(chk[13]), .failures(fail[13]), .cycles(cyc[13]));

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    repeat (3) @(negedge clk);
    rst_n = 1;
    do begin
      @(negedge clk);
      all = 1;
      for (int c = 0; c < NCFG; c++) all &= fin[c];
    end while (!all);
    for (int c = 0; c < NCFG; c++) begin
      checks += chk[c];
      failures += fail[c];
      $display("configuration %0d: %0d cycles", c, cyc[c]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
