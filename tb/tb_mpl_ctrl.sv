// tb_mpl_ctrl: self-checking testbench of the ladder controller (K = 4,
// L = 16). A small model here plays the exponent memory (read latency 2) and
// the multiplier (done D cycles after start). The testbench checks that one
// step is launched per exponent bit, that e_i walks the exponent from the
// most significant bit down, that order starts at 0 and flips after every
// step, and that done rises 1 + 3*(L/K) + L*(D+1) cycles after start.
module tb_mpl_ctrl;
  localparam int unsigned K = 4, L = 16, EW = L / K, EAW = 2, D = 20;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, mmd_start, mmd_done = 0, e_i, order;
  logic [EAW-1:0] e_addr;
  logic [K-1:0] e_dout;
  logic [K-1:0] emem [EW];
  logic [K-1:0] rd1, rd2;
  logic [L-1:0] e;
  int checks = 0, failures = 0, steps, cyc, bad;

  always #5 clk = ~clk;
  mpl_ctrl #(.K(K), .L(L)) dut (.*);

  // exponent memory model, 2-cycle read
  always @(posedge clk) begin rd1 <= emem[e_addr]; rd2 <= rd1; end
  assign e_dout = rd2;

  // multiplier model
  initial forever begin
    @(posedge clk);
    if (mmd_start) begin
      if (e_i !== e[L-1-steps]) bad++;
      if (order !== steps[0]) bad++;
      steps++;
      repeat (D - 1) @(posedge clk);
      #1 mmd_done = 1;
      @(posedge clk);
      #1 mmd_done = 0;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      e = L'($urandom);
      if (run == 0) e = 16'h8001;
      for (int w = 0; w < EW; w++) emem[w] = e[w*K +: K];
      steps = 0; bad = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 1 + 3 * EW + L * (D + 1)) begin
        failures++; $display("done after %0d cycles, expected %0d", cyc, 1 + 3 * EW + L * (D + 1));
      end
      checks++;
      if (steps != L || bad != 0) begin failures++; $display("steps %0d bad %0d", steps, bad); end
      checks++;
      if (busy) begin failures++; $display("busy after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
