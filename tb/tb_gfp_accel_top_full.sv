// tb_gfp_accel_top_full: end-to-end test of the accelerator at its default
// size (K = 32, N = L = 1024, 32 digits per operand): one 1024-bit modular
// exponentiation through the AXI4-Lite port, with a 1024-bit Montgomery
// product on the stand-alone multiplier running at the same time. The
// result is checked against square-and-multiply on wide vectors, and the
// exponentiation time against 1 + 3*(L/K) + L*(n(n+1)+5) cycles.
module tb_gfp_accel_top_full;
  localparam int unsigned K = 32, N = 1024, L = N;
  localparam int unsigned NDIG = N / K, EW = L / K, AW = $clog2(NDIG);
  localparam int unsigned NTEST = 1;

  logic clk = 0, rst_n = 0;
  logic [15:0] s_axi_awaddr = 0, s_axi_araddr = 0;
  logic s_axi_awvalid = 0, s_axi_wvalid = 0, s_axi_bready = 0, s_axi_arvalid = 0, s_axi_rready = 0;
  logic s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [31:0] s_axi_wdata = 0, s_axi_rdata;
  logic [3:0] s_axi_wstrb = 4'hf;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic exp_done;
  logic mm_ld_we = 0; logic [1:0] mm_ld_sel = 0; logic [AW-1:0] mm_ld_addr = 0;
  logic [K-1:0] mm_ld_data = 0; logic mm_start = 0, mm_busy, mm_done;
  logic [AW-1:0] mm_rd_addr = 0; logic [K-1:0] mm_rd_data;
  int checks = 0, failures = 0;
  int n_e1 = 0, n_e0 = 0, n_ord0 = 0, n_ord1 = 0, n_fetch = 0, n_azero = 0, n_cwb = 0;
  int n_slverr = 0, n_ign_start = 0, n_pp = 0, n_mm = 0;
  bit exp_running = 0;

  always #5 clk = ~clk;

  gfp_accel_top dut (.*);

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    if (dut.u_exp.u_core.mmd_start) begin
      if (dut.u_exp.u_core.e_i) n_e1++; else n_e0++;
      if (dut.u_exp.u_core.order) n_ord1++; else n_ord0++;
    end
    if (dut.u_exp.u_core.u_ctrl.state == 2'd1 &&
        dut.u_exp.u_core.u_ctrl.fcnt == 0) n_fetch++;
    if (dut.u_exp.u_core.s_en && dut.u_exp.u_core.a_zero) n_azero++;
    if (dut.u_exp.u_core.we && dut.u_exp.u_core.sel_c) n_cwb++;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

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

  // AXI4-Lite master
  task automatic axi_write(input logic [15:0] addr, input logic [31:0] data, output logic [1:0] resp);
    @(negedge clk);
    s_axi_awaddr = addr; s_axi_awvalid = 1; s_axi_wdata = data; s_axi_wvalid = 1; s_axi_bready = 1;
    do @(posedge clk); while (!(s_axi_awready && s_axi_wready));
    @(negedge clk); s_axi_awvalid = 0; s_axi_wvalid = 0;
    while (!s_axi_bvalid) @(negedge clk);
    resp = s_axi_bresp;
    @(posedge clk); @(negedge clk); s_axi_bready = 0;
  endtask

  task automatic axi_read(input logic [15:0] addr, output logic [31:0] data);
    @(negedge clk);
    s_axi_araddr = addr; s_axi_arvalid = 1; s_axi_rready = 1;
    do @(posedge clk); while (!s_axi_arready);
    @(negedge clk); s_axi_arvalid = 0;
    while (!s_axi_rvalid) @(negedge clk);
    data = s_axi_rdata;
    @(posedge clk); @(negedge clk); s_axi_rready = 0;
  endtask

  task automatic wr(input logic [15:0] addr, input logic [31:0] data);
    logic [1:0] resp;
    axi_write(addr, data, resp);
    chk(resp == 2'b00, $sformatf("write %h answered %0d", addr, resp));
  endtask

  // one exponentiation through the bus
  task automatic exp_one(input logic [N-1:0] p, input logic [N-1:0] g, input logic [L-1:0] e);
    logic [2*N-1:0] t;
    logic [N-1:0] one_m, g_m, x, expect_x;
    logic [31:0] rd;
    logic [1:0] resp;
    int cyc, exp_cyc;
    t = ((2*N)'(1) << N) % (2*N)'(p); one_m = N'(t);
    t = ((2*N)'(g) << N) % (2*N)'(p); g_m = N'(t);
    for (int d = 0; d < NDIG; d++) begin
      wr(16'h1000 + 16'(4*d), 32'(p[d*K +: K]));
      wr(16'h3000 + 16'(4*d), 32'(one_m[d*K +: K]));
      wr(16'h4000 + 16'(4*d), 32'(g_m[d*K +: K]));
    end
    for (int w = 0; w < EW; w++) wr(16'h2000 + 16'(4*w), 32'(e[w*K +: K]));
    wr(16'h0004, 32'(neg_inv(p[K-1:0])));
    axi_read(16'h0004, rd);
    chk(rd == 32'(neg_inv(p[K-1:0])), "p' read-back");
    n_pp++;
    cyc = 0;
    fork
      begin
        // count cycles from the start write to done
        while (!dut.u_exp.core_start) @(posedge clk);
        @(posedge clk); cyc = 1;
        while (!exp_done) begin @(posedge clk); cyc++; end
      end
      begin
        wr(16'h0000, 32'd1);
        // bus traffic while busy: a dropped write and an ignored start
        repeat (20) @(negedge clk);
        axi_write(16'h3000, 32'h1234, resp);
        chk(resp == 2'b10, "memory write while busy must get SLVERR");
        if (resp == 2'b10) n_slverr++;
        axi_write(16'h0000, 32'd1, resp);
        n_ign_start++;
        axi_read(16'h0000, rd);
        chk(rd[1:0] == 2'b10, $sformatf("STATUS while busy %h", rd));
      end
    join
    exp_cyc = 1 + 3 * EW + L * (NDIG * (NDIG + 1) + 5);
    chk(cyc == exp_cyc, $sformatf("exponentiation took %0d cycles, expected %0d", cyc, exp_cyc));
    axi_read(16'h0000, rd);
    chk(rd[1:0] == 2'b01, $sformatf("STATUS after run %h", rd));
    for (int d = 0; d < NDIG; d++) begin
      axi_read(16'h3000 + 16'(4*d), rd);
      x[d*K +: K] = rd[K-1:0];
    end
    t = ((2*N)'(modexp(g, e, p)) << N) % (2*N)'(p);
    expect_x = N'(t);
    chk(x < 2 * p && (x % p) == expect_x, $sformatf("exponentiation result e=%h", e));
  endtask

  // one product on the stand-alone multiplier
  task automatic mm_one(input logic [N-1:0] p, input logic [N-1:0] x, input logic [N-1:0] y);
    logic [N-1:0] a;
    logic [2*N+1:0] pp;
    int cyc;
    for (int s = 0; s < 3; s++)
      for (int d = 0; d < NDIG; d++) begin
        @(negedge clk); mm_ld_we = 1; mm_ld_sel = 2'(s); mm_ld_addr = AW'(d);
        mm_ld_data = (s == 0) ? p[d*K +: K] : (s == 1) ? x[d*K +: K] : y[d*K +: K];
      end
    @(negedge clk); mm_ld_sel = 2'd3; mm_ld_data = neg_inv(p[K-1:0]);
    @(negedge clk); mm_ld_we = 0; mm_start = 1;
    @(negedge clk); mm_start = 0; cyc = 1;
    while (!mm_done) begin @(negedge clk); cyc++; end
    chk(cyc == NDIG * (NDIG + 1) + 4, $sformatf("multiplier latency %0d", cyc));
    @(negedge clk);
    for (int d = 0; d < NDIG; d++) begin
      mm_rd_addr = AW'(d); @(negedge clk); @(negedge clk); a[d*K +: K] = mm_rd_data;
    end
    pp = (2*N+2)'(p);
    chk(a < 2 * p && (((2*N+2)'(a) << N) % pp) == (((2*N+2)'(x) * (2*N+2)'(y)) % pp),
        "Montgomery product");
    n_mm++;
  endtask

  initial begin
    logic [N-1:0] p, g, x, y; logic [L-1:0] e;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NTEST; t++) begin
      p = rnd_n(); p[N-1:N-2] = 2'b00; p[N-3] = 1'b1; p[0] = 1'b1;
      g = rnd_n() % p;
      e = L'(rnd_n());
      if (t == 1) e = '1;
      if (t == 2) e = L'(1);
      x = rnd_n() % (2 * p); y = rnd_n() % (2 * p);
      fork
        exp_one(p, g, e);
        begin
          for (int m = 0; m < 1; m++) begin
            x = rnd_n() % (2 * p); y = rnd_n() % (2 * p);
            mm_one(p, x, y);
          end
        end
      join
    end
    $display("mechanisms: e_i=1 %0d, e_i=0 %0d, pair X/Y %0d, pair XX/YY %0d, e fetches %0d,",
             n_e1, n_e0, n_ord0, n_ord1, n_fetch);
    $display("  A zeroed %0d, carry write-backs %0d, SLVERR %0d, ignored starts %0d, p' reads %0d, products %0d",
             n_azero, n_cwb, n_slverr, n_ign_start, n_pp, n_mm);
    chk(n_e1 > 0, "no ladder step with e_i = 1");
    chk(n_e0 > 0, "no ladder step with e_i = 0");
    chk(n_ord0 > 0 && n_ord1 > 0, "memory pairs did not swap roles");
    chk(n_fetch > NTEST, "exponent word fetch not repeated");
    chk(n_azero > 0, "accumulator zeroing never used");
    chk(n_cwb > 0, "carry write-back never used");
    chk(n_slverr > 0, "no SLVERR response");
    chk(n_ign_start > 0, "no start while busy");
    chk(n_pp > 0, "no p' read-back");
    chk(n_mm > 0, "no stand-alone product");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
