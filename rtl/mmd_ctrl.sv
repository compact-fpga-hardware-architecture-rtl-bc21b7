// mmd_ctrl: control unit of the digit-digit Montgomery multiplier. It walks
// the two loops of the iterative Montgomery product (outer index i over the
// digits Y_i, inner index j over the digits X_j, A_j, p_j) and orchestrates
// the block RAMs and the mmd datapath.
//
// Schedule: every outer iteration takes n + 1 issue slots. Slot 0 ("first")
// reads digit 0 so that the datapath can form s<0> and then q<i>; slot 1
// reads digit 0 again and slots 2..n read digits 1..n-1, each producing one
// digit t<j>. t<j> is written to A_(j-1) (j > 0), and the carry c<n> of
// iteration i is written to A_(n-1) in the write-back slot of the "first"
// token of iteration i+1, i.e. in the same cycle in which q<i+1> becomes
// available. One extra flush slot after the last iteration writes the last
// carry. With block RAM read latency RL the stages are:
//   issue (cycle T)  : rd_j / rd_i addresses, token created
//   T+1              : p_addr (the modulus is read one cycle later, because
//                      r<j> = q * p_j is formed one stage after s<j>)
//   T+RL             : s_en                                (stage S)
//   T+RL+1           : q_en (first) or e_en (main)         (stage E)
//   T+RL+2           : we / waddr / sel_c                  (stage W)
// With RL = 2 (registered BRAM output plus output pipeline register) a
// product takes n(n+1)+4 cycles from the start cycle to the done cycle, the
// latency the document gives. The result is in memory from the next cycle.
//
// Short operands: the read of A_j in iteration i+1 must come after its write
// in iteration i, which needs at least RL+5 slots per iteration. For fewer
// digits (n < RL+4, i.e. n < 6 with RL = 2) P = RL+4-n idle slots are
// appended to every iteration; the carry is then written by the first idle
// slot and the last iteration ends there (no flush slot). The latency becomes
// (n-1)(n+1+P) + n + 5 cycles. This padding is this design's own; the
// document does not discuss it.
//
// Interface: start is sampled only while idle, and the first read is issued
// in the start cycle itself. done is a one-cycle pulse. The result memory is
// read (port for A_j) at rd_j and written at waddr.
module mmd_ctrl
  import mmd_pkg::*;
#(
  parameter int unsigned NDIG = 32,
  parameter int unsigned RL   = 2,
  localparam int unsigned AW  = (NDIG > 1) ? $clog2(NDIG) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // read addresses (issue stage)
  output logic [AW-1:0] rd_j,     // X_j and A_j
  output logic [AW-1:0] rd_i,     // Y_i
  output logic [AW-1:0] p_addr,   // p_j, one cycle after rd_j
  // datapath strobes
  output logic          a_zero,
  output logic          s_en,
  output logic          q_en,
  output logic          e_en,
  output logic          c_clr,
  output logic          sel_c,
  // result write-back
  output logic          we,
  output logic [AW-1:0] waddr
);

  if (NDIG < 2) begin : g_bad_ndig
    $error("mmd_ctrl: NDIG must be at least 2");
  end

  localparam int unsigned DL   = RL + 2;
  // idle slots per outer iteration so that an iteration spans >= RL+5 slots
  localparam int unsigned NPAD = (NDIG + 1 >= RL + 5) ? 0 : RL + 4 - NDIG;
  localparam int unsigned PW   = (NPAD > 1) ? $clog2(NPAD) : 1;

  typedef enum logic [1:0] {PH_FIRST, PH_MAIN, PH_PAD, PH_FLUSH} phase_e;

  logic          busy_q;
  logic [AW:0]   i_cnt;
  logic [AW-1:0] j_cnt;
  logic [PW-1:0] pad_cnt;
  phase_e        phase;
  logic          last_i;
  logic          issue;
  mmd_token_t    tok_in;
  mmd_token_t    pipe [1:DL];
  mmd_token_t    ts, te, tw;

  assign issue  = start | busy_q;
  assign busy   = busy_q;
  assign last_i = (i_cnt == (AW+1)'(NDIG - 1));

  always_comb begin
    tok_in       = '0;
    tok_in.valid = issue;
    tok_in.i_is0 = (i_cnt == '0) && (phase != PH_FLUSH);
    tok_in.j     = JW'(j_cnt);
    unique case (phase)
      PH_FIRST: begin
        tok_in.kind = SLOT_FIRST;
        tok_in.wc   = (NPAD == 0) && (i_cnt != '0);   // carry of iteration i-1
      end
      PH_MAIN:  tok_in.kind = SLOT_MAIN;
      PH_PAD: begin
        tok_in.kind = SLOT_PAD;
        tok_in.wc   = (pad_cnt == '0);                // carry of this iteration
        tok_in.last = (pad_cnt == '0) && last_i;
      end
      default: begin
        tok_in.kind = SLOT_FLUSH;
        tok_in.wc   = 1'b1;
        tok_in.last = 1'b1;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      i_cnt   <= '0;
      j_cnt   <= '0;
      pad_cnt <= '0;
      phase   <= PH_FIRST;
    end else if (issue) begin
      busy_q <= 1'b1;
      unique case (phase)
        PH_FIRST: phase <= PH_MAIN;
        PH_MAIN: begin
          if (j_cnt == AW'(NDIG - 1)) begin
            j_cnt <= '0;
            if (NPAD != 0) begin
              pad_cnt <= '0;
              phase   <= PH_PAD;
            end else if (last_i) begin
              phase <= PH_FLUSH;
            end else begin
              i_cnt <= i_cnt + 1'b1;
              phase <= PH_FIRST;
            end
          end else begin
            j_cnt <= j_cnt + 1'b1;
          end
        end
        PH_PAD: begin
          if (last_i) begin                    // carry written: product ends
            busy_q <= 1'b0;
            i_cnt  <= '0;
            phase  <= PH_FIRST;
          end else if (pad_cnt == PW'(NPAD - 1)) begin
            i_cnt <= i_cnt + 1'b1;
            phase <= PH_FIRST;
          end else begin
            pad_cnt <= pad_cnt + 1'b1;
          end
        end
        default: begin                         // PH_FLUSH
          busy_q <= 1'b0;
          i_cnt  <= '0;
          phase  <= PH_FIRST;
        end
      endcase
    end
  end

  // token delay line
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 1; d <= DL; d++) pipe[d] <= '0;
      p_addr <= '0;
    end else begin
      pipe[1] <= tok_in;
      for (int d = 2; d <= DL; d++) pipe[d] <= pipe[d-1];
      p_addr <= rd_j;
    end
  end

  assign rd_j = j_cnt;
  assign rd_i = i_cnt[AW-1:0];

  assign ts = pipe[RL];
  assign te = pipe[RL+1];
  assign tw = pipe[RL+2];

  // stage S
  assign s_en   = ts.valid && (ts.kind == SLOT_FIRST || ts.kind == SLOT_MAIN);
  assign a_zero = ts.i_is0;
  // stage E
  assign q_en   = te.valid && te.kind == SLOT_FIRST;
  assign e_en   = te.valid && te.kind == SLOT_MAIN;
  assign c_clr  = e_en && (te.j == '0);
  // stage W
  assign sel_c  = tw.wc;
  assign we     = tw.valid && (tw.wc || (tw.kind == SLOT_MAIN && tw.j != '0));
  assign waddr  = tw.wc ? AW'(NDIG - 1) : AW'(tw.j - 1'b1);
  assign done   = tw.valid && tw.last;

  // a start while busy would be lost
  assert property (@(posedge clk) disable iff (!rst_n) !(start && busy_q))
    else $error("mmd_ctrl: start while busy");

endmodule
