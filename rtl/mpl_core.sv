// mpl_core: GF(p) exponentiator built on the Montgomery Powering Ladder with
// two digit-digit Montgomery multipliers. It computes, in the Montgomery
// domain (R = 2^N = beta^n),
//   X <- R mod p, Y <- g';  for i = L-1 downto 0:
//     e_i = 1: X <- MMD0(X, Y), Y <- MMD1(Y, Y)
//     e_i = 0: X <- MMD0(X, X), Y <- MMD1(Y, X)
// and leaves X = g'^e * R^(1-e) mod p (i.e. (g^e) * R mod p when g' = g*R),
// as a value below 2p, in the memory pair that was written last.
//
// Structure: six block RAMs (e and p single-port; X, Y, XX, YY dual-port),
// two mmd datapaths, one mmd_ctrl shared by both (they run in lockstep) and
// the ladder controller mpl_ctrl. Both steps of a ladder iteration run in
// parallel and read the old X and Y, because the products go to the other
// memory pair; the pairs swap roles after every step (signal order).
// Inner-loop operand of MMD0 is always X, of MMD1 always Y; the outer-loop
// digit Y_i of both is read from port b of Y (e_i = 1) or X (e_i = 0). A
// destination memory is written through port a and read as accumulator A_j
// through port b.
//
// Host port (used while idle): h_we, h_region (region_e), h_addr (digit or
// word index) and h_wdata write a digit; for a read, h_rdata is valid 2
// cycles after h_region/h_addr. Region MEM_X/MEM_Y read the pair that holds
// the newest X/Y, so MEM_X returns the result after done. Operands are
// written to BRam-X (1 in Montgomery form) and BRam-Y (g in Montgomery form).
// The placement of '1' and g follows the ladder algorithm; the host port and
// the register map are this design's own.
// Timing: start -> done = 1 + 3*(L/K) + L*(n(n+1)+5) cycles for n >= 6
// (see mpl_ctrl and mmd_ctrl).
// Requirements: 4p < 2^N, g' < 2p, NDIG >= 2, L a multiple of K.
module mpl_core
  import mmd_pkg::*;
#(
  parameter int unsigned K   = 32,
  parameter int unsigned N   = 1024,
  parameter int unsigned L   = N,
  localparam int unsigned NDIG = N / K,
  localparam int unsigned EW   = L / K,
  localparam int unsigned AW   = (NDIG > 1) ? $clog2(NDIG) : 1,
  localparam int unsigned EAW  = (EW > 1) ? $clog2(EW) : 1,
  localparam int unsigned HAW  = (AW > EAW) ? AW : EAW
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  input  logic [K-1:0]   p_prime,
  input  logic           h_we,
  input  region_e        h_region,
  input  logic [HAW-1:0] h_addr,
  input  logic [K-1:0]   h_wdata,
  output logic [K-1:0]   h_rdata
);

  localparam int unsigned RL = 2;

  // controller / sequencer signals
  logic           mmd_start, mmd_done, mmd_busy;
  logic           e_i, order;
  logic [EAW-1:0] e_addr;
  logic [K-1:0]   e_dout, p_dout;
  logic [AW-1:0]  rd_j, rd_i, p_addr, waddr;
  logic           a_zero, s_en, q_en, e_en, c_clr, sel_c, we;
  logic           run;
  logic [K-1:0]   r0, r1;

  // memories: index 0 = X, 1 = Y, 2 = XX, 3 = YY
  logic [AW-1:0] m_a_addr [4];
  logic          m_a_we   [4];
  logic [K-1:0]  m_a_din  [4];
  logic [K-1:0]  m_a_dout [4];
  logic [AW-1:0] m_b_addr [4];
  logic [K-1:0]  m_b_dout [4];

  logic [K-1:0] x0, x1, yi, a0, a1;
  region_e      rreg [1:RL];

  assign run  = busy;

  mpl_ctrl #(.K(K), .L(L), .RL(RL)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .e_addr, .e_dout, .mmd_start, .mmd_done, .e_i, .order
  );

  mmd_ctrl #(.NDIG(NDIG), .RL(RL)) u_seq (
    .clk, .rst_n, .start(mmd_start), .busy(mmd_busy), .done(mmd_done),
    .rd_j, .rd_i, .p_addr,
    .a_zero, .s_en, .q_en, .e_en, .c_clr, .sel_c,
    .we, .waddr
  );

  bram_sp #(.W(K), .DEPTH(EW), .OUT_REG(1)) u_bram_e (
    .clk, .addr(run ? e_addr : EAW'(h_addr)),
    .we(!run && h_we && h_region == MEM_E), .din(h_wdata), .dout(e_dout)
  );

  bram_sp #(.W(K), .DEPTH(NDIG), .OUT_REG(1)) u_bram_p (
    .clk, .addr(run ? p_addr : AW'(h_addr)),
    .we(!run && h_we && h_region == MEM_P), .din(h_wdata), .dout(p_dout)
  );

  // port steering of the four operand/result memories
  always_comb begin
    for (int m = 0; m < 4; m++) begin
      automatic logic is_dst = (m >= 2) ? !order : order;  // XX/YY written when order = 0
      automatic logic is_x   = (m == 0) || (m == 2);
      if (!run) begin
        m_a_addr[m] = AW'(h_addr);
        m_a_we[m]   = h_we && (m < 2) &&
                      (h_region == (is_x ? MEM_X : MEM_Y));
        m_a_din[m]  = h_wdata;
        m_b_addr[m] = AW'(h_addr);
      end else if (is_dst) begin
        m_a_addr[m] = waddr;
        m_a_we[m]   = we;
        m_a_din[m]  = is_x ? r0 : r1;
        m_b_addr[m] = rd_j;
      end else begin
        m_a_addr[m] = rd_j;
        m_a_we[m]   = 1'b0;
        m_a_din[m]  = '0;
        m_b_addr[m] = rd_i;
      end
    end
  end

  for (genvar m = 0; m < 4; m++) begin : g_mem
    bram_dp #(.W(K), .DEPTH(NDIG), .OUT_REG(1)) u_bram (
      .clk,
      .a_addr(m_a_addr[m]), .a_we(m_a_we[m]), .a_din(m_a_din[m]), .a_dout(m_a_dout[m]),
      .b_addr(m_b_addr[m]), .b_we(1'b0), .b_din('0), .b_dout(m_b_dout[m])
    );
  end

  // operand multiplexers (selects are constant during a ladder step)
  always_comb begin
    x0 = order ? m_a_dout[2] : m_a_dout[0];
    x1 = order ? m_a_dout[3] : m_a_dout[1];
    if (e_i) yi = order ? m_b_dout[3] : m_b_dout[1];
    else     yi = order ? m_b_dout[2] : m_b_dout[0];
    a0 = order ? m_b_dout[0] : m_b_dout[2];
    a1 = order ? m_b_dout[1] : m_b_dout[3];
  end

  mmd #(.K(K)) u_mmd0 (
    .clk, .rst_n,
    .x_j(x0), .y_i(yi), .a_j(a0), .p_j(p_dout), .p_prime,
    .a_zero, .s_en, .q_en, .e_en, .c_clr, .sel_c,
    .r_out(r0)
  );

  mmd #(.K(K)) u_mmd1 (
    .clk, .rst_n,
    .x_j(x1), .y_i(yi), .a_j(a1), .p_j(p_dout), .p_prime,
    .a_zero, .s_en, .q_en, .e_en, .c_clr, .sel_c,
    .r_out(r1)
  );

  // host read data, aligned with the memory read latency
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 1; d <= RL; d++) rreg[d] <= REG_CTRL_STATUS;
    end else begin
      rreg[1] <= h_region;
      for (int d = 2; d <= RL; d++) rreg[d] <= rreg[d-1];
    end
  end

  always_comb begin
    unique case (rreg[RL])
      MEM_P:   h_rdata = p_dout;
      MEM_E:   h_rdata = e_dout;
      MEM_X:   h_rdata = order ? m_a_dout[2] : m_a_dout[0];
      MEM_Y:   h_rdata = order ? m_a_dout[3] : m_a_dout[1];
      default: h_rdata = '0;
    endcase
  end

  assert property (@(posedge clk) disable iff (!rst_n) mmd_start |-> !mmd_busy)
    else $error("mpl_core: multiplier restarted while busy");

endmodule
