// mpl_wl_runner: testbench helper that runs one modular exponentiation on an
// mpl_core of the given size and checks it. It loads a random odd modulus p
// (N-2 bits, so 4p < 2^N), R mod p, g*R mod p and a random L-bit exponent
// with its top bit set, runs the ladder, and compares the result with
// square-and-multiply on wide vectors and the run time with
// 1 + 3*(L/K) + L*(T+1) cycles, T the product latency: n(n+1)+4 for
// n >= 6, (n-1)(n+1+P)+n+5 with P = 6-n idle slots per outer iteration for
// smaller n. It reports the cycle count so the
// caller can compare it with published figures.
module mpl_wl_runner
  import mmd_pkg::*;
#(
  parameter int unsigned K = 16,
  parameter int unsigned N = 128
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   cycles
);
  localparam int unsigned L = N, NDIG = N / K, EW = L / K;
  localparam int unsigned NPAD = (NDIG >= 6) ? 0 : 6 - NDIG;
  localparam int          TMMD = (NDIG - 1) * (NDIG + 1 + NPAD) + NDIG + 5;
  localparam int unsigned HAW = $clog2(NDIG) > $clog2(EW) ? $clog2(NDIG) : $clog2(EW);

  logic start = 0, busy, done;
  logic [K-1:0] p_prime = 0;
  logic h_we = 0; region_e h_region = MEM_P; logic [HAW-1:0] h_addr = 0;
  logic [K-1:0] h_wdata = 0, h_rdata;

  mpl_core #(.K(K), .N(N), .L(L)) dut (.*);

  function automatic logic [K-1:0] neg_inv(input logic [K-1:0] p0);
    logic [K-1:0] x = 1;
    for (int it = 0; it < 7; it++) x = x * (2 - p0 * x);
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

  initial begin
    logic [N-1:0] p, g, one_m, g_m, x, expect_x;
    logic [2*N-1:0] t;
    logic [L-1:0] e;
    int exp_cyc;
    finished = 0; checks = 0; failures = 0; cycles = 0;
    p = rnd_n(); p[N-1:N-2] = 2'b00; p[N-3] = 1'b1; p[0] = 1'b1;
    g = rnd_n() % p;
    e = L'(rnd_n()); e[L-1] = 1'b1;
    @(posedge rst_n);
    t = ((2*N)'(1) << N) % (2*N)'(p); one_m = N'(t);
    t = ((2*N)'(g) << N) % (2*N)'(p); g_m = N'(t);
    for (int d = 0; d < NDIG; d++) begin
      hwrite(MEM_P, d, p[d*K +: K]);
      hwrite(MEM_X, d, one_m[d*K +: K]);
      hwrite(MEM_Y, d, g_m[d*K +: K]);
    end
    for (int w = 0; w < EW; w++) hwrite(MEM_E, w, e[w*K +: K]);
    p_prime = neg_inv(p[K-1:0]);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    exp_cyc = 1 + 3 * EW + L * (TMMD + 1);
    checks++;
    if (cycles != exp_cyc) begin
      failures++; $display("K=%0d N=%0d: %0d cycles, expected %0d", K, N, cycles, exp_cyc);
    end
    for (int d = 0; d < NDIG; d++) begin
      @(negedge clk); h_region = MEM_X; h_addr = HAW'(d);
      @(negedge clk); @(negedge clk);
      x[d*K +: K] = h_rdata;
    end
    t = ((2*N)'(modexp(g, e, p)) << N) % (2*N)'(p);
    expect_x = N'(t);
    checks++;
    if (x >= 2 * p || (x % p) != expect_x) begin
      failures++; $display("K=%0d N=%0d: wrong result", K, N);
    end
    finished = 1;
  end
endmodule
