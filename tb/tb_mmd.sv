// tb_mmd: self-checking testbench of the Montgomery digit datapath. For
// random digits it steps the datapath through the sequence the controller
// uses (load s, compute q, then two accumulate steps, the first with the
// carry cleared) and compares the t and c outputs with values computed here
// with wide integer arithmetic: s = A_j + X_j*Y_i (A_j = 0 when a_zero),
// q = (s*p') mod 2^K, {c,t} = s + q*p_j + c.
module tb_mmd;
  localparam int unsigned K = 16;
  logic clk = 0, rst_n = 0;
  logic [K-1:0] x_j = 0, y_i = 0, a_j = 0, p_j = 0, p_prime = 0;
  logic a_zero = 0, s_en = 0, q_en = 0, e_en = 0, c_clr = 0, sel_c = 0;
  logic [K-1:0] r_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mmd #(.K(K)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [K-1:0] got, input logic [K-1:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin failures++; $display("%s: got %h expected %h", what, got, exp_v); end
  endtask

  initial begin
    longint unsigned s, q, c, sum, pj2;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      x_j = K'($urandom); y_i = K'($urandom); a_j = K'($urandom); p_prime = K'($urandom);
      a_zero = (t % 5 == 0);
      if (t == 1) begin x_j = '1; y_i = '1; a_j = '1; end
      s = longint'(x_j) * longint'(y_i) + (a_zero ? 0 : longint'(a_j));
      @(negedge clk); s_en = 1;
      @(negedge clk); s_en = 0; q_en = 1;
      q = (s * longint'(p_prime)) % (64'd1 << K);
      @(negedge clk); q_en = 0; e_en = 1; c_clr = 1; p_j = K'($urandom);
      if (t == 1) p_j = '1;
      sum = s + q * longint'(p_j);
      c = sum >> K;
      @(negedge clk); e_en = 0; c_clr = 0; sel_c = 0;
      #1 check(r_out, K'(sum), "t (c cleared)");
      sel_c = 1;
      #1 check(r_out, K'(c), "c (c cleared)");
      @(negedge clk); e_en = 1; p_j = K'($urandom);
      pj2 = longint'(p_j);
      sum = s + q * pj2 + c;
      @(negedge clk); e_en = 0; sel_c = 0;
      #1 check(r_out, K'(sum), "t (with carry)");
      sel_c = 1;
      #1 check(r_out, K'(sum >> K), "c (with carry)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
