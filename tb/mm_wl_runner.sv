// mm_wl_runner: testbench helper that runs random products on one
// stand-alone Montgomery multiplier of the given size. For each product it
// loads a random odd p (N-2 bits), X, Y < 2p and p', checks the latency
// (n-1)(n+1+P)+n+5 with P = max(0, 6-n) idle slots per outer iteration
// (n(n+1)+4 for n >= 6) and checks the result A < 2p with A*2^N == X*Y (mod p), using
// wide-vector arithmetic.
module mm_wl_runner #(
  parameter int unsigned K = 16,
  parameter int unsigned N = 128,
  parameter int unsigned NPROD = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned NDIG = N / K, AW = $clog2(NDIG);
  localparam int unsigned NPAD = (NDIG >= 6) ? 0 : 6 - NDIG;
  localparam int          TLAT = (NDIG - 1) * (NDIG + 1 + NPAD) + NDIG + 5;

  logic ld_we = 0; logic [1:0] ld_sel = 0; logic [AW-1:0] ld_addr = 0; logic [K-1:0] ld_data = 0;
  logic start = 0, busy, done;
  logic [AW-1:0] rd_addr = 0; logic [K-1:0] rd_data;

  mont_mult #(.K(K), .NDIG(NDIG)) dut (.*);

  function automatic logic [K-1:0] neg_inv(input logic [K-1:0] p0);
    logic [K-1:0] x = 1;
    for (int it = 0; it < 7; it++) x = x * (2 - p0 * x);
    return -x;
  endfunction

  function automatic logic [N-1:0] rnd_n();
    logic [N-1:0] v;
    for (int w = 0; w < (N + 31) / 32; w++) v = (v << 32) | N'($urandom);
    return v;
  endfunction

  initial begin
    logic [N-1:0] p, x, y, a;
    logic [2*N-1:0] pp;
    int cyc;
    finished = 0; checks = 0; failures = 0;
    @(posedge rst_n);
    for (int t = 0; t < NPROD; t++) begin
      p = rnd_n(); p[N-1:N-2] = 2'b00; p[N-3] = 1'b1; p[0] = 1'b1;
      x = rnd_n() % (2 * p); y = rnd_n() % (2 * p);
      for (int s = 0; s < 3; s++)
        for (int d = 0; d < NDIG; d++) begin
          @(negedge clk); ld_we = 1; ld_sel = 2'(s); ld_addr = AW'(d);
          ld_data = (s == 0) ? p[d*K +: K] : (s == 1) ? x[d*K +: K] : y[d*K +: K];
        end
      @(negedge clk); ld_sel = 2'd3; ld_data = neg_inv(p[K-1:0]);
      @(negedge clk); ld_we = 0; start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != TLAT) begin
        failures++; $display("K=%0d N=%0d: latency %0d", K, N, cyc);
      end
      @(negedge clk);
      for (int d = 0; d < NDIG; d++) begin
        rd_addr = AW'(d); @(negedge clk); @(negedge clk); a[d*K +: K] = rd_data;
      end
      pp = (2*N)'(p);
      checks++;
      if (!(a < 2 * p && (((2*N)'(a) << N) % pp) == (((2*N)'(x) * (2*N)'(y)) % pp))) begin
        failures++; $display("K=%0d N=%0d: wrong product", K, N);
      end
    end
    finished = 1;
  end
endmodule
