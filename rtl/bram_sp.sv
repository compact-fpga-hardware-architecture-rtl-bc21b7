// bram_sp: single-port block RAM, the model of the single-port BRams that
// hold the modulus p and the exponent e (only one word per cycle is needed
// from them).
//
// One address serves both the write and the read. The read is synchronous
// and read-first; with OUT_REG = 1 the data passes an extra output register,
// giving a read latency of 1 + OUT_REG cycles, the same as bram_dp.
//
// Interface: clk, addr, we, din, dout.
module bram_sp #(
  parameter int unsigned W       = 32,
  parameter int unsigned DEPTH   = 32,
  parameter int unsigned OUT_REG = 1,
  localparam int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [W-1:0]  din,
  output logic [W-1:0]  dout
);

  logic [W-1:0] mem [DEPTH];
  logic [W-1:0] q;

  always_ff @(posedge clk) begin
    q <= mem[addr];
    if (we) mem[addr] <= din;
  end

  if (OUT_REG != 0) begin : g_oreg
    logic [W-1:0] r;
    always_ff @(posedge clk) r <= q;
    assign dout = r;
  end else begin : g_noreg
    assign dout = q;
  end

endmodule
