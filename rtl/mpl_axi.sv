// mpl_axi: AXI4-Lite slave that turns mpl_core into a memory-mapped
// coprocessor for a host processor. The host writes p, p', e, '1' and g in
// 32-bit words, starts the exponentiation, polls the done flag and reads the
// result back word by word.
//
// Register map (byte address, 32-bit data, bits [15:12] = region):
//   0x0000 CTRL/STATUS  write: bit 0 = start (ignored while busy)
//                       read : bit 0 = done, bit 1 = busy
//   0x0004 P_PRIME      p' = -p^(-1) mod 2^K (low K bits)
//   0x1000 + 4*i        digit i of p
//   0x2000 + 4*w        word w of the exponent e (bit b of e at word b/K)
//   0x3000 + 4*i        write: digit i of 1 in Montgomery form (R mod p);
//                       read : digit i of the result X
//   0x4000 + 4*i        write: digit i of g in Montgomery form; read: Y
// Each 32-bit word carries one K-bit digit (K <= 32, low bits). A memory
// write while busy is dropped and answered with SLVERR; other accesses get
// OKAY. One transaction is handled at a time: a write needs AWVALID and
// WVALID together and is answered on B the next cycle; a memory read returns
// RDATA 3 cycles after the AR handshake, a register read 1 cycle after.
// WSTRB is ignored (whole-word writes only).
// The 32-bit host word size and the done flag follow the document; the map,
// handshake details and error response are this design's own.
module mpl_axi
  import mmd_pkg::*;
#(
  parameter int unsigned K  = 32,
  parameter int unsigned N  = 1024,
  parameter int unsigned L  = N,
  localparam int unsigned ADDR_W = 16
) (
  input  logic              aclk,
  input  logic              aresetn,
  // write address
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  // write data
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  // write response
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  // read address
  input  logic [ADDR_W-1:0] s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  // read data
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // completion flag (same as STATUS bit 0), for an interrupt line
  output logic              done
);

  if (K > 32) begin : g_bad_k
    $error("mpl_axi: K must not exceed the 32-bit bus width");
  end

  localparam int unsigned NDIG = N / K;
  localparam int unsigned EW   = L / K;
  localparam int unsigned AW   = (NDIG > 1) ? $clog2(NDIG) : 1;
  localparam int unsigned EAW  = (EW > 1) ? $clog2(EW) : 1;
  localparam int unsigned HAW  = (AW > EAW) ? AW : EAW;
  localparam logic [1:0]  OKAY = 2'b00, SLVERR = 2'b10;

  typedef enum logic [1:0] {A_IDLE, A_RWAIT, A_RRESP, A_BRESP} astate_e;

  astate_e        st;
  logic [1:0]     rcnt;
  logic [K-1:0]   p_prime_q;
  logic           core_start, core_busy, core_done;
  logic           h_we;
  region_e        h_region;
  logic [HAW-1:0] h_addr;
  logic [K-1:0]   h_rdata;
  logic           wr_go, rd_go;
  region_e        aw_reg, ar_reg;

  assign aw_reg = region_e'(s_axi_awaddr[15:12]);
  assign ar_reg = region_e'(s_axi_araddr[15:12]);

  // one transaction at a time, writes first
  assign wr_go = (st == A_IDLE) && s_axi_awvalid && s_axi_wvalid;
  assign rd_go = (st == A_IDLE) && !wr_go && s_axi_arvalid;

  assign s_axi_awready = wr_go;
  assign s_axi_wready  = wr_go;
  assign s_axi_arready = rd_go;

  // host port of the core
  always_comb begin
    h_we       = wr_go && (aw_reg != REG_CTRL_STATUS);
    h_region   = wr_go ? aw_reg : ar_reg;
    h_addr     = wr_go ? HAW'(s_axi_awaddr[11:2]) : HAW'(s_axi_araddr[11:2]);
    core_start = wr_go && (aw_reg == REG_CTRL_STATUS) &&
                 (s_axi_awaddr[11:2] == '0) && s_axi_wdata[0] && !core_busy;
  end

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      st           <= A_IDLE;
      rcnt         <= '0;
      p_prime_q    <= '0;
      s_axi_bvalid <= 1'b0;
      s_axi_bresp  <= OKAY;
      s_axi_rvalid <= 1'b0;
      s_axi_rresp  <= OKAY;
      s_axi_rdata  <= '0;
    end else begin
      unique case (st)
        A_IDLE: begin
          if (wr_go) begin
            s_axi_bvalid <= 1'b1;
            s_axi_bresp  <= (h_we && core_busy) ? SLVERR : OKAY;
            if (aw_reg == REG_CTRL_STATUS && s_axi_awaddr[11:2] == 10'd1 && !core_busy)
              p_prime_q <= s_axi_wdata[K-1:0];
            st <= A_BRESP;
          end else if (rd_go) begin
            s_axi_rresp <= OKAY;
            if (ar_reg == REG_CTRL_STATUS) begin
              s_axi_rdata  <= (s_axi_araddr[11:2] == 10'd1) ? 32'(p_prime_q)
                                                            : {30'd0, core_busy, core_done};
              s_axi_rvalid <= 1'b1;
              st           <= A_RRESP;
            end else begin
              rcnt      <= '0;
              st        <= A_RWAIT;
            end
          end
        end
        A_RWAIT: begin
          rcnt <= rcnt + 1'b1;
          if (rcnt == 2'd1) begin
            s_axi_rdata  <= 32'(h_rdata);
            s_axi_rvalid <= 1'b1;
                  st           <= A_RRESP;
          end
        end
        A_RRESP: if (s_axi_rready) begin
          s_axi_rvalid <= 1'b0;
          st           <= A_IDLE;
        end
        A_BRESP: if (s_axi_bready) begin
          s_axi_bvalid <= 1'b0;
          st           <= A_IDLE;
        end
        default: st <= A_IDLE;
      endcase
    end
  end

  mpl_core #(.K(K), .N(N), .L(L)) u_core (
    .clk(aclk), .rst_n(aresetn),
    .start(core_start), .busy(core_busy), .done(core_done),
    .p_prime(p_prime_q),
    .h_we, .h_region, .h_addr, .h_wdata(s_axi_wdata[K-1:0]), .h_rdata
  );

  assign done = core_done;

  // AXI rule: a valid response is held until it is accepted
  assert property (@(posedge aclk) disable iff (!aresetn)
                   s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata))
    else $error("mpl_axi: RVALID dropped or RDATA changed before RREADY");
  assert property (@(posedge aclk) disable iff (!aresetn)
                   s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid && $stable(s_axi_bresp))
    else $error("mpl_axi: BVALID dropped or BRESP changed before BREADY");

endmodule
