// tb_bram_dp: self-checking testbench of the true dual-port block RAM
// (read latency 2). Random reads and writes on both ports are compared with
// a reference array; a read of an address written in the same cycle must
// return the old word (read-first).
module tb_bram_dp;
  localparam int unsigned W = 16, DEPTH = 16, AW = 4;
  logic clk = 0;
  logic [AW-1:0] a_addr = 0, b_addr = 0;
  logic a_we = 0, b_we = 0;
  logic [W-1:0] a_din = 0, b_din = 0, a_dout, b_dout;
  logic [W-1:0] ref_mem [DEPTH];
  logic [W-1:0] ea [3], eb [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  bram_dp #(.W(W), .DEPTH(DEPTH), .OUT_REG(1)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); a_we = 1; a_addr = AW'(i); a_din = W'($urandom); ref_mem[i] = a_din;
    end
    @(negedge clk); a_we = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // expected data of the reads issued two cycles ago
      if (t >= 2) begin
        checks += 2;
        if (a_dout !== ea[(t - 2) % 3]) begin failures++; $display("a mismatch t=%0d", t); end
        if (b_dout !== eb[(t - 2) % 3]) begin failures++; $display("b mismatch t=%0d", t); end
      end
      a_addr = AW'($urandom); b_addr = AW'($urandom);
      a_we = ($urandom % 3) == 0; b_we = ($urandom % 3) == 0 && (b_addr != a_addr);
      a_din = W'($urandom); b_din = W'($urandom);
      ea[t % 3] = ref_mem[a_addr]; eb[t % 3] = ref_mem[b_addr];
      if (b_we) ref_mem[b_addr] = b_din;
      if (a_we) ref_mem[a_addr] = a_din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
