// tb_mont_mult: self-checking testbench of the stand-alone digit-digit
// Montgomery multiplier. Random moduli p (odd, 4p < 2^N), random operands
// X, Y < 2p are loaded digit by digit; the result A read back must satisfy
// A < 2p and A == X*Y*2^(-N) mod p, which is checked independently as
// (A * 2^N - X*Y) mod p == 0 with wide arithmetic. p' is computed here by
// Newton iteration. The start-to-done latency must be n(n+1)+4 cycles.
// Edge cases: X = 0, X = Y = 2p-1, p of full allowed width.
module tb_mont_mult;
  localparam int unsigned K    = 16;
  localparam int unsigned NDIG = 8;
  localparam int unsigned N    = K * NDIG;
  localparam int unsigned AW   = $clog2(NDIG);
  localparam int unsigned NTEST = 40;

  logic clk = 0, rst_n = 0;
  logic ld_we = 0; logic [1:0] ld_sel = 0; logic [AW-1:0] ld_addr = 0; logic [K-1:0] ld_data = 0;
  logic start = 0, busy, done;
  logic [AW-1:0] rd_addr = 0; logic [K-1:0] rd_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mont_mult #(.K(K), .NDIG(NDIG)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [K-1:0] neg_inv(input logic [K-1:0] p0);
    logic [K-1:0] x = 1;
    for (int it = 0; it < 6; it++) x = x * (2 - p0 * x);  // x = p0^-1 mod 2^K
    return -x;
  endfunction

  function automatic logic [N-1:0] rnd_n();
    logic [N-1:0] v;
    for (int w = 0; w < N / 32; w++) v[w*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic load(input logic [1:0] sel, input logic [N-1:0] v);
    for (int d = 0; d < NDIG; d++) begin
      @(negedge clk); ld_we = 1; ld_sel = sel; ld_addr = AW'(d); ld_data = v[d*K +: K];
    end
    @(negedge clk); ld_we = 0;
  endtask

  task automatic run_one(input logic [N-1:0] p, input logic [N-1:0] x, input logic [N-1:0] y);
    logic [N-1:0] a;
    logic [2*N+1:0] lhs, rhs, pp;
    int cyc;
    load(2'd0, p); load(2'd1, x); load(2'd2, y);
    @(negedge clk); ld_we = 1; ld_sel = 2'd3; ld_data = neg_inv(p[K-1:0]);
    @(negedge clk); ld_we = 0; start = 1;
    cyc = 0;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != NDIG * (NDIG + 1) + 4) begin
      failures++; $display("latency %0d expected %0d", cyc, NDIG * (NDIG + 1) + 4);
    end
    @(negedge clk);
    for (int d = 0; d < NDIG; d++) begin
      rd_addr = AW'(d);
      @(negedge clk); @(negedge clk);
      a[d*K +: K] = rd_data;
    end
    pp  = (2*N+2)'(p);
    lhs = ((2*N+2)'(a) << N) % pp;
    rhs = ((2*N+2)'(x) * (2*N+2)'(y)) % pp;
    checks++;
    if (lhs != rhs || a >= 2 * p) begin
      failures++;
      $display("mismatch p=%h x=%h y=%h a=%h", p, x, y, a);
    end
  endtask

  initial begin
    logic [N-1:0] p, x, y;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NTEST; t++) begin
      p = rnd_n();
      p[N-1:N-2] = 2'b00;
      if (t % 2 == 0) p[N-3] = 1'b1;        // full allowed width
      p[0] = 1'b1;
      x = rnd_n() % (2 * p);
      y = rnd_n() % (2 * p);
      if (t == 0) x = 0;
      if (t == 1) begin x = 2 * p - 1; y = 2 * p - 1; end
      run_one(p, x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
