// tb_mmd_ctrl: self-checking testbench of the Montgomery sequencer. One
// mmd_ctrl_runner per digit count n in {2, 3, 5, 6, 8}; the small counts use
// idle slots between outer iterations, n = 6 and 8 the plain n+1 slot
// schedule. See mmd_ctrl_runner for the individual checks.
module tb_mmd_ctrl;
  localparam int NR = 5;
  localparam int unsigned NS [NR] = '{2, 3, 5, 6, 8};
  logic clk = 0;
  logic fin [NR];
  int   chk_r [NR], fail_r [NR];

  always #5 clk = ~clk;

  for (genvar g = 0; g < NR; g++) begin : g_run
    mmd_ctrl_runner #(.NDIG(NS[g])) u_run (
      .clk(clk), .fin(fin[g]), .checks(chk_r[g]), .failures(fail_r[g]));
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    int checks, failures;
    checks = 0; failures = 0;
    repeat (2) @(posedge clk);     // the runners clear fin at time 0
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4]);
    for (int r = 0; r < NR; r++) begin
      checks += chk_r[r];
      failures += fail_r[r];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
