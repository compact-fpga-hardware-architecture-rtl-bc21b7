// bram_dp: true dual-port block RAM, the model of the dual-port BRams that
// hold the operands and partial results of the MPL exponentiator (BRam-X,
// BRam-Y, BRam-XX, BRam-YY) and the result memory BRam-A of the stand-alone
// multiplier.
//
// Each port has its own address, write enable and write data. Writes take
// effect at the clock edge. Reads are synchronous and read-first (a port that
// writes and reads one address in a cycle returns the old word). With
// OUT_REG = 1 the read data passes one more output register, the optional
// output pipelining of the memory banks, so the read latency is 1 + OUT_REG
// cycles. If both ports write the same address in one cycle, port a wins
// (the design never does this).
//
// Interface: clk; port a (a_addr, a_we, a_din, a_dout); port b (same).
module bram_dp #(
  parameter int unsigned W       = 32,
  parameter int unsigned DEPTH   = 32,
  parameter int unsigned OUT_REG = 1,
  localparam int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  input  logic          a_we,
  input  logic [W-1:0]  a_din,
  output logic [W-1:0]  a_dout,
  input  logic [AW-1:0] b_addr,
  input  logic          b_we,
  input  logic [W-1:0]  b_din,
  output logic [W-1:0]  b_dout
);

  logic [W-1:0] mem [DEPTH];
  logic [W-1:0] a_q, b_q;

  always_ff @(posedge clk) begin
    a_q <= mem[a_addr];
    b_q <= mem[b_addr];
    if (b_we) mem[b_addr] <= b_din;
    if (a_we) mem[a_addr] <= a_din;
  end

  if (OUT_REG != 0) begin : g_oreg
    logic [W-1:0] a_r, b_r;
    always_ff @(posedge clk) begin
      a_r <= a_q;
      b_r <= b_q;
    end
    assign a_dout = a_r;
    assign b_dout = b_r;
  end else begin : g_noreg
    assign a_dout = a_q;
    assign b_dout = b_q;
  end

endmodule
