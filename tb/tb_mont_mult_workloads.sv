// tb_mont_mult_workloads: runs the stand-alone Montgomery multiplier over
// the size sweep of its published evaluation, digit sizes k = 2, 4, 8, 16,
// 32, 64 and operand sizes N = 256, 512, 1024, 2048, all in parallel, one
// instance per configuration (24 points; k = 64, N = 256 has only n = 4
// digits and runs with idle slots between outer iterations). Every product
// is checked for the right result and for the expected latency.
module tb_mont_mult_workloads;
  localparam int NCFG = 24;
  logic clk = 0, rst_n = 0;
  logic fin [NCFG];
  int   chk [NCFG], fail [NCFG];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  mm_wl_runner #(.K(2), .N(256)) u_k2_n256 (.clk, .rst_n, .finished(fin[0]), .checks(chk[0]), .failures(fail[0]));
  mm_wl_runner #(.K(2), .N(512)) u_k2_n512 (.clk, .rst_n, .finished(fin[1]), .checks(chk[1]), .failures(fail[1]));
  mm_wl_runner #(.K(2), .N(1024)) u_k2_n1024 (.clk, .rst_n, .finished(fin[2]), .checks(chk[2]), .failures(fail[2]));
  mm_wl_runner #(.K(2), .N(2048)) u_k2_n2048 (.clk, .rst_n, .finished(fin[3]), .checks(chk[3]), .failures(fail[3]));
  mm_wl_runner #(.K(4), .N(256)) u_k4_n256 (.clk, .rst_n, .finished(fin[4]), .checks(chk[4]), .failures(fail[4]));
  mm_wl_runner #(.K(4), .N(512)) u_k4_n512 (.clk, .rst_n, .finished(fin[5]), .checks(chk[5]), .failures(fail[5]));
  mm_wl_runner #(.K(4), .N(1024)) u_k4_n1024 (.clk, .rst_n, .finished(fin[6]), .checks(chk[6]), .failures(fail[6]));
  mm_wl_runner #(.K(4), .N(2048)) u_k4_n2048 (.clk, .rst_n, .finished(fin[7]), .checks(chk[7]), .failures(fail[7]));
  mm_wl_runner #(.K(8), .N(256)) u_k8_n256 (.clk, .rst_n, .finished(fin[8]), .checks(chk[8]), .failures(fail[8]));
  mm_wl_runner #(.K(8), .N(512)) u_k8_n512 (.clk, .rst_n, .finished(fin[9]), .checks(chk[9]), .failures(fail[9]));
  mm_wl_runner #(.K(8), .N(1024)) u_k8_n1024 (.clk, .rst_n, .finished(fin[10]), .checks(chk[10]), .failures(fail[10]));
  mm_wl_runner #(.K(8), .N(2048)) u_k8_n2048 (.clk, .rst_n, .finished(fin[11]), .checks(chk[11]), .failures(fail[11]));
  mm_wl_runner #(.K(16), .N(256)) u_k16_n256 (.clk, .rst_n, .finished(fin[12]), .checks(chk[12]), .failures(fail[12]));
  mm_wl_runner #(.K(16), .N(512)) u_k16_n512 (.clk, .rst_n, .finished(fin[13]), .checks(chk[13]), .failures(fail[13]));
  mm_wl_runner #(.K(16), .N(1024)) u_k16_n1024 (.clk, .rst_n, .finished(fin[14]), .checks(chk[14]), .failures(fail[14]));
  mm_wl_runner #(.K(16), .N(2048)) u_k16_n2048 (.clk, .rst_n, .finished(fin[15]), .checks(chk[15]), .failures(fail[15]));
  mm_wl_runner #(.K(32), .N(256)) u_k32_n256 (.clk, .rst_n, .finished(fin[16]), .checks(chk[16]), .failures(fail[16]));
  mm_wl_runner #(.K(32), .N(512)) u_k32_n512 (.clk, .rst_n, .finished(fin[17]), .checks(chk[17]), .failures(fail[17]));
  mm_wl_runner #(.K(32), .N(1024)) u_k32_n1024 (.clk, .rst_n, .finished(fin[18]), .checks(chk[18]), .failures(fail[18]));
  mm_wl_runner #(.K(32), .N(2048)) u_k32_n2048 (.clk, .rst_n, .finished(fin[19]), .checks(chk[19]), .failures(fail[19]));
  mm_wl_runner #(.K(64), .N(256)) u_k64_n256 (.clk, .rst_n, .finished(fin[23]), .checks(chk[23]), .failures(fail[23]));
  mm_wl_runner #(.K(64), .N(512)) u_k64_n512 (.clk, .rst_n, .finished(fin[20]), .checks(chk[20]), .failures(fail[20]));
  mm_wl_runner #(.K(64), .N(1024)) u_k64_n1024 (.clk, .rst_n, .finished(fin[21]), .checks(chk[21]), .failures(fail[21]));
  mm_wl_runner #(.K(64), .N(2048)) u_k64_n2048 (.clk, .rst_n, .finished(fin[22]), .checks(chk[22]), .failures(fail[22]));

  initial begin
    repeat (3000000) @(posedge clk);
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
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
