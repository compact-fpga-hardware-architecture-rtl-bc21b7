// tb_mpl_workloads: runs the exponentiation configurations of the published
// comparison table on the MPL core, one instance per configuration, all in
// parallel: {k = 16, N = 1024}, {k = 32, N = 1024}, {k = 64, N = 1024},
// {k = 16, N = 512} and {k = 64, N = 2048}, each with an exponent as long
// as the operand. Each run is checked for the correct result and for the
// cycle count 1 + 3*(L/K) + L*(n(n+1)+5); the counts are also compared with
// the published average cycle counts (in thousands): 4265, 1087, 284, 543
// and 2174, which must agree to within 1000 cycles, one unit of the last
// published digit.
module tb_mpl_workloads;
  localparam int NCFG = 5;
  localparam int PUB [NCFG] = '{4265, 1087, 284, 543, 2174};
  logic clk = 0, rst_n = 0;
  logic fin [NCFG];
  int   chk [NCFG], fail [NCFG], cyc [NCFG];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  mpl_wl_runner #(.K(16), .N(1024)) u_k16_n1024 (.clk, .rst_n, .finished(fin[0]), .checks(chk[0]), .failures(fail[0]), .cycles(cyc[0]));
  mpl_wl_runner #(.K(32), .N(1024)) u_k32_n1024 (.clk, .rst_n, .finished(fin[1]), .checks(chk[1]), .failures(fail[1]), .cycles(cyc[1]));
  mpl_wl_runner #(.K(64), .N(1024)) u_k64_n1024 (.clk, .rst_n, .finished(fin[2]), .checks(chk[2]), .failures(fail[2]), .cycles(cyc[2]));
  mpl_wl_runner #(.K(16), .N(512))  u_k16_n512  (.clk, .rst_n, .finished(fin[3]), .checks(chk[3]), .failures(fail[3]), .cycles(cyc[3]));
  mpl_wl_runner #(.K(64), .N(2048)) u_k64_n2048 (.clk, .rst_n, .finished(fin[4]), .checks(chk[4]), .failures(fail[4]), .cycles(cyc[4]));

  initial begin
    repeat (6000000) @(posedge clk);
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
      checks += chk[c] + 1;
      failures += fail[c];
      $display("configuration %0d: %0d cycles, published %0d thousand", c, cyc[c], PUB[c]);
      if (cyc[c] - PUB[c] * 1000 > 1000 || PUB[c] * 1000 - cyc[c] > 1000) begin
        failures++; $display("  differs from the published count by more than 1000 cycles");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
