// mont_mult: stand-alone digit-digit Montgomery multiplier. It computes
//   A = X * Y * beta^(-n) mod p   (beta = 2^K, n = NDIG digits, result < 2p)
// with every operand and the result held in block RAMs, one K-bit digit per
// word: BRam-p, BRam-X, BRam-Y, the result memory BRam-A and the constant
// register p' = -p^(-1) mod beta. The mmd datapath does the arithmetic and
// mmd_ctrl runs the iterative algorithm; the partial result A lives in
// BRam-A throughout (read at digit j, written back at digit j-1), so no
// shift register is needed.
//
// Interface:
//   ld_we/ld_sel/ld_addr/ld_data : load port, used while idle. ld_sel selects
//                                  0 = p, 1 = X, 2 = Y, 3 = p' (ld_addr unused)
//   start/busy/done               : start a product; done pulses when the
//                                  last result digit is being written
//   rd_addr/rd_data               : result read port (BRam-A), used while
//                                  idle; rd_data is valid 2 cycles after
//                                  rd_addr
// Timing: n(n+1)+4 cycles from the start cycle to done for n >= 6 digits;
// (n-1)(n+1+P)+n+5 with P = 6-n for n = 2..5 (see mmd_ctrl).
// Operand rules (from the algorithm): X, Y < 2p and 4p < beta^n, i.e. p is
// at most N-2 bits wide; the result is then below 2p (no final subtraction).
// The 2-cycle read latency (registered BRAM plus output register) follows the
// document's pipelined memory outputs; the load port is this design's own.
module mont_mult #(
  parameter int unsigned K    = 32,
  parameter int unsigned NDIG = 32,
  localparam int unsigned AW  = (NDIG > 1) ? $clog2(NDIG) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ld_we,
  input  logic [1:0]    ld_sel,
  input  logic [AW-1:0] ld_addr,
  input  logic [K-1:0]  ld_data,
  input  logic          start,
  output logic          busy,
  output logic          done,
  input  logic [AW-1:0] rd_addr,
  output logic [K-1:0]  rd_data
);

  localparam int unsigned RL = 2;

  logic [AW-1:0] rd_j, rd_i, p_addr, waddr;
  logic          a_zero, s_en, q_en, e_en, c_clr, sel_c, we;
  logic [K-1:0]  p_prime_q;
  logic [K-1:0]  x_dout, y_dout, p_dout, a_dout, r_out, unused_a;
  logic          run;

  assign run = busy | start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                               p_prime_q <= '0;
    else if (ld_we && !run && ld_sel == 2'd3) p_prime_q <= ld_data;
  end

  mmd_ctrl #(.NDIG(NDIG), .RL(RL)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .rd_j, .rd_i, .p_addr,
    .a_zero, .s_en, .q_en, .e_en, .c_clr, .sel_c,
    .we, .waddr
  );

  bram_sp #(.W(K), .DEPTH(NDIG), .OUT_REG(1)) u_bram_p (
    .clk, .addr(run ? p_addr : ld_addr),
    .we(ld_we && !run && ld_sel == 2'd0), .din(ld_data), .dout(p_dout)
  );

  bram_sp #(.W(K), .DEPTH(NDIG), .OUT_REG(1)) u_bram_x (
    .clk, .addr(run ? rd_j : ld_addr),
    .we(ld_we && !run && ld_sel == 2'd1), .din(ld_data), .dout(x_dout)
  );

  bram_sp #(.W(K), .DEPTH(NDIG), .OUT_REG(1)) u_bram_y (
    .clk, .addr(run ? rd_i : ld_addr),
    .we(ld_we && !run && ld_sel == 2'd2), .din(ld_data), .dout(y_dout)
  );

  // BRam-A: port a writes result digits, port b reads A_j (or the result)
  bram_dp #(.W(K), .DEPTH(NDIG), .OUT_REG(1)) u_bram_a (
    .clk,
    .a_addr(waddr), .a_we(we), .a_din(r_out), .a_dout(unused_a),
    .b_addr(run ? rd_j : rd_addr), .b_we(1'b0), .b_din('0), .b_dout(a_dout)
  );

  mmd #(.K(K)) u_mmd (
    .clk, .rst_n,
    .x_j(x_dout), .y_i(y_dout), .a_j(a_dout), .p_j(p_dout), .p_prime(p_prime_q),
    .a_zero, .s_en, .q_en, .e_en, .c_clr, .sel_c,
    .r_out
  );

  assign rd_data = a_dout;

endmodule
