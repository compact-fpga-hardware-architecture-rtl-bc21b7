// gfp_accel_top: GF(p) arithmetic accelerator for embedded devices, built
// from digit-digit Montgomery arithmetic with all operands in block RAM.
//
// Two independent units stand side by side, each with its own ports:
//   * the modular exponentiator (Montgomery Powering Ladder with two
//     digit-digit Montgomery multipliers), reached by a host processor
//     through an AXI4-Lite slave port (see mpl_axi for the register map);
//   * a stand-alone digit-digit Montgomery multiplier with a plain load /
//     start / read port (see mont_mult).
// Both share the clock and the active-low reset. The processor system, AXI
// interconnect and reset generator that surround the exponentiator in a
// system-on-chip are not part of this module; the AXI4-Lite port is where
// the interconnect attaches.
//
// Parameters: K = digit size in bits, N = operand size, L = exponent size.
// Defaults K = 32, N = 1024 (n = 32 digits), L = N are the configuration
// used for the in-system test of the exponentiator.
module gfp_accel_top #(
  parameter int unsigned K = 32,
  parameter int unsigned N = 1024,
  parameter int unsigned L = N,
  localparam int unsigned NDIG = N / K,
  localparam int unsigned AW   = (NDIG > 1) ? $clog2(NDIG) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // exponentiator, AXI4-Lite slave
  input  logic [15:0]   s_axi_awaddr,
  input  logic          s_axi_awvalid,
  output logic          s_axi_awready,
  input  logic [31:0]   s_axi_wdata,
  input  logic [3:0]    s_axi_wstrb,
  input  logic          s_axi_wvalid,
  output logic          s_axi_wready,
  output logic [1:0]    s_axi_bresp,
  output logic          s_axi_bvalid,
  input  logic          s_axi_bready,
  input  logic [15:0]   s_axi_araddr,
  input  logic          s_axi_arvalid,
  output logic          s_axi_arready,
  output logic [31:0]   s_axi_rdata,
  output logic [1:0]    s_axi_rresp,
  output logic          s_axi_rvalid,
  input  logic          s_axi_rready,
  output logic          exp_done,
  // stand-alone Montgomery multiplier
  input  logic          mm_ld_we,
  input  logic [1:0]    mm_ld_sel,
  input  logic [AW-1:0] mm_ld_addr,
  input  logic [K-1:0]  mm_ld_data,
  input  logic          mm_start,
  output logic          mm_busy,
  output logic          mm_done,
  input  logic [AW-1:0] mm_rd_addr,
  output logic [K-1:0]  mm_rd_data
);

  mpl_axi #(.K(K), .N(N), .L(L)) u_exp (
    .aclk(clk), .aresetn(rst_n),
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .done(exp_done)
  );

  mont_mult #(.K(K), .NDIG(NDIG)) u_mm (
    .clk, .rst_n,
    .ld_we(mm_ld_we), .ld_sel(mm_ld_sel), .ld_addr(mm_ld_addr), .ld_data(mm_ld_data),
    .start(mm_start), .busy(mm_busy), .done(mm_done),
    .rd_addr(mm_rd_addr), .rd_data(mm_rd_data)
  );

endmodule
