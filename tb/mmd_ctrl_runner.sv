// mmd_ctrl_runner: drives one mmd_ctrl instance with NDIG digits through
// three products and checks, for each:
//   - the start-to-done latency (n-1)(n+1+P) + n + 5, P = max(0, 6-n) idle
//     slots per outer iteration (n(n+1)+4 for n >= 6);
//   - the numbers of s, q and accumulate strobes (n(n+1), n, n*n) and c clears;
//   - the write-back sequence (A_0..A_(n-2) from t, then A_(n-1) from c, once
//     per outer iteration, n*n writes);
//   - the a_zero flag only in outer iteration 0;
//   - that every accumulator digit read in iteration i+1 was written in
//     iteration i at an earlier clock edge than the read.
// Results are reported through checks / failures once fin is set.
module mmd_ctrl_runner #(
  parameter int unsigned NDIG = 8
) (
  input  logic clk,
  output logic fin,
  output int   checks,
  output int   failures
);
  localparam int unsigned AW   = (NDIG > 1) ? $clog2(NDIG) : 1;
  localparam int unsigned NPAD = (NDIG >= 6) ? 0 : 6 - NDIG;
  localparam int          TLAT = (NDIG - 1) * (NDIG + 1 + NPAD) + NDIG + 5;

  logic rst_n = 0, start = 0;
  logic busy, done, a_zero, s_en, q_en, e_en, c_clr, sel_c, we;
  logic [AW-1:0] rd_j, rd_i, p_addr, waddr;
  int n_s, n_q, n_e, n_w, n_clr, n_az, cyc, wexp_j, wexp_i, wr_iter[NDIG];
  bit order_bad;

  mmd_ctrl #(.NDIG(NDIG)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL n=%0d: %s", NDIG, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    // an accumulator read (first or main slot) in iteration i > 0 must see
    // iteration i-1's digit, written at an earlier edge
    if ((busy || start) && dut.i_cnt != 0 && int'(dut.phase) < 2
        && wr_iter[rd_j] != int'(dut.i_cnt) - 1)
      order_bad = 1;
    if (s_en) n_s++;
    if (q_en) n_q++;
    if (e_en) n_e++;
    if (c_clr) n_clr++;
    if (s_en && a_zero) n_az++;
    if (we) begin
      n_w++;
      if (int'(waddr) != (wexp_j == NDIG ? NDIG - 1 : wexp_j - 1) || sel_c != (wexp_j == NDIG))
        order_bad = 1;
      wr_iter[waddr] = wexp_i;
      if (wexp_j == NDIG) begin wexp_j = 1; wexp_i++; end else wexp_j++;
    end
  end

  initial begin
    fin = 0; checks = 0; failures = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      n_s = 0; n_q = 0; n_e = 0; n_w = 0; n_clr = 0; n_az = 0; wexp_j = 1; wexp_i = 0;
      order_bad = 0;
      foreach (wr_iter[a]) wr_iter[a] = -1;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      repeat (3) @(negedge clk);
      chk(cyc == TLAT, $sformatf("latency %0d, expected %0d", cyc, TLAT));
      chk(n_s == NDIG * (NDIG + 1), $sformatf("s_en count %0d", n_s));
      chk(n_q == NDIG, $sformatf("q_en count %0d", n_q));
      chk(n_e == NDIG * NDIG, $sformatf("e_en count %0d", n_e));
      chk(n_clr == NDIG, $sformatf("c_clr count %0d", n_clr));
      chk(n_az == NDIG + 1, $sformatf("a_zero count %0d", n_az));
      chk(n_w == NDIG * NDIG, $sformatf("write count %0d", n_w));
      chk(!order_bad, "write sequence / read-after-write order");
      chk(!busy, "idle after done");
    end
    fin = 1;
  end
endmodule
