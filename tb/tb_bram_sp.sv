// tb_bram_sp: self-checking testbench of the single-port block RAM (read
// latency 2, read-first). Random reads and writes are compared with a
// reference array.
module tb_bram_sp;
  localparam int unsigned W = 16, DEPTH = 16, AW = 4;
  logic clk = 0;
  logic [AW-1:0] addr = 0;
  logic we = 0;
  logic [W-1:0] din = 0, dout;
  logic [W-1:0] ref_mem [DEPTH];
  logic [W-1:0] ed [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  bram_sp #(.W(W), .DEPTH(DEPTH), .OUT_REG(1)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; addr = AW'(i); din = W'($urandom); ref_mem[i] = din;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t >= 2) begin
        checks++;
        if (dout !== ed[(t - 2) % 3]) begin failures++; $display("mismatch t=%0d", t); end
      end
      addr = AW'($urandom); we = ($urandom % 3) == 0; din = W'($urandom);
      ed[t % 3] = ref_mem[addr];
      if (we) ref_mem[addr] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
