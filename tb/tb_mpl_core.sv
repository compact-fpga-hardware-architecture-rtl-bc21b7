// tb_mpl_core: self-checking testbench of the MPL exponentiator core at a
// reduced size (K = 16, N = L = 128, n = 8 digits). For random odd moduli p
// with 4p < 2^N it loads p, R mod p (the Montgomery form of 1), g*R mod p and
// a random exponent through the host port, runs the ladder and reads the
// result X. X must be below 2p and congruent to g^e * R mod p, where g^e mod
// p is computed here by plain square-and-multiply on wide vectors. The
// start-to-done time must equal 1 + 3*(L/K) + L*(n(n+1)+5) cycles. The
// exponents include 0, 1 and all-ones; the testbench counts ladder steps
// taken with e_i = 1 and e_i = 0 and steps run from each memory pair.
module tb_mpl_core;
  import mmd_pkg::*;
  localparam int unsigned K = 16, N = 128, L = 128;
  localparam int unsigned NDIG = N / K, EW = L / K;
  localparam int unsigned HAW = $clog2(NDIG) > $clog2(EW) ? $clog2(NDIG) : $clog2(EW);
  localparam int unsigned NTEST = 6;

  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  logic [K-1:0] p_prime = 0;
  logic h_we = 0; region_e h_region = MEM_P; logic [HAW-1:0] h_addr = 0;
  logic [K-1:0] h_wdata = 0, h_rdata;
  int checks = 0, failures = 0;
  int n_e1 = 0, n_e0 = 0, n_ord0 = 0, n_ord1 = 0;

  always #5 clk = ~clk;

  mpl_core #(.K(K), .N(N), .L(L)) dut (.*);

  always @(posedge clk) if (dut.mmd_start) begin
    if (dut.e_i) n_e1++; else n_e0++;
    if (dut.order) n_ord1++; else n_ord0++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [K-1:0] neg_inv(input logic [K-1:0] p0);
    logic [K-1:0] x = 1;
    for (int it = 0; it < 6; it++) x = x * (2 - p0 * x);
    return -x;
  endfunction

  function automatic logic [N-1:0] rnd_n();
    logic [N-1:0] v;
    for (int w = 0; w < N / 32; w++) v[w*32 +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [N-1:0] modexp(input logic [N-1:0] g, input logic [L-1:0] e,
                                          input logic [N-1:0] p);
    logic [2*N-1:0] r = 1, b = (2*N)'(g), m = (2*N)'(p);
    for (int i = L - 1; i >= 0; i--) begin
      r = (r * r) % m;
      if (e[i]) r = (r * b) % m;
    end
    return N'(r);
  endfunction

  task automatic hwrite(input region_e reg_, input int idx, input logic [K-1:0] v);
    @(negedge clk); h_we = 1; h_region = reg_; h_addr = HAW'(idx); h_wdata = v;
    @(negedge clk); h_we = 0;
  endtask

  task automatic run_one(input logic [N-1:0] p, input logic [N-1:0] g, input logic [L-1:0] e);
    logic [2*N-1:0] rr, gm;
    logic [N-1:0] one_m, g_m, x, expect_x;
    int cyc, exp_cyc;
    rr    = (2*N)'(1) << N;
    one_m = N'(rr % (2*N)'(p));
    gm    = ((2*N)'(g) << N) % (2*N)'(p);
    g_m   = N'(gm);
    for (int d = 0; d < NDIG; d++) begin
      hwrite(MEM_P, d, p[d*K +: K]);
      hwrite(MEM_X, d, one_m[d*K +: K]);
      hwrite(MEM_Y, d, g_m[d*K +: K]);
    end
    for (int w = 0; w < EW; w++) hwrite(MEM_E, w, e[w*K +: K]);
    p_prime = neg_inv(p[K-1:0]);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    exp_cyc = 1 + 3 * EW + L * (NDIG * (NDIG + 1) + 5);
    checks++;
    if (cyc != exp_cyc) begin failures++; $display("cycles %0d expected %0d", cyc, exp_cyc); end
    for (int d = 0; d < NDIG; d++) begin
      @(negedge clk); h_region = MEM_X; h_addr = HAW'(d);
      @(negedge clk); @(negedge clk);
      x[d*K +: K] = h_rdata;
    end
    expect_x = N'(((2*N)'(modexp(g, e, p)) << N) % (2*N)'(p));
    checks++;
    if (x >= 2 * p || (x % p) != expect_x) begin
      failures++;
      $display("mismatch e=%h x=%h expected %h", e, x, expect_x);
    end
  endtask

  initial begin
    logic [N-1:0] p, g; logic [L-1:0] e;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NTEST; t++) begin
      p = rnd_n(); p[N-1:N-2] = 2'b00; p[N-3] = 1'b1; p[0] = 1'b1;
      g = rnd_n() % p;
      e = L'(rnd_n());
      if (t == 0) e = '0;
      if (t == 1) e = L'(1);
      if (t == 2) e = '1;
      run_one(p, g, e);
    end
    checks++;
    if (n_e1 == 0 || n_e0 == 0 || n_ord0 == 0 || n_ord1 == 0) begin
      failures++; $display("mechanism not exercised");
    end
    $display("ladder steps: e_i=1 %0d, e_i=0 %0d, from X/Y %0d, from XX/YY %0d",
             n_e1, n_e0, n_ord0, n_ord1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
