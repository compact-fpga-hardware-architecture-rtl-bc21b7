// mpl_ctrl: control unit of the Montgomery Powering Ladder exponentiator.
//
// It scans the exponent e from its most significant bit down to bit 0. The
// exponent sits in a single-port block RAM, K bits per word, word EW-1
// holding the top bits; the controller fetches one word at a time into a
// shift register (RL+1 cycles per word) and then runs one ladder step per
// bit: it pulses mmd_start to launch both Montgomery multipliers (they run
// in lockstep under one mmd_ctrl) and waits for mmd_done. For that step it
// drives
//   e_i   : the current exponent bit, which selects the operand shared by
//           both multipliers as outer-loop digit (Y if e_i = 1, X if 0);
//   order : which memory pair is read (0: BRam-X/Y, 1: BRam-XX/YY); the other
//           pair receives the products. order flips after every step, so the
//           memories swap roles instead of copying results back.
// order is cleared at start, so the operands are loaded into BRam-X/Y.
//
// Timing: start (sampled while idle) -> done register high after
//   1 + (RL+1)*EW + L*(T_mmd + 1) cycles, T_mmd the multiplier latency
// (n(n+1)+4 for n >= 6, longer for fewer digits, see mmd_ctrl). done stays high until the next start; busy is high in between.
// The word-wise exponent fetch is this design's choice; the document only
// states that e is kept in a single-port BRam.
module mpl_ctrl #(
  parameter int unsigned K  = 32,
  parameter int unsigned L  = 1024,
  parameter int unsigned RL = 2,
  localparam int unsigned EW  = L / K,
  localparam int unsigned EAW = (EW > 1) ? $clog2(EW) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic [EAW-1:0] e_addr,
  input  logic [K-1:0]   e_dout,
  output logic           mmd_start,
  input  logic           mmd_done,
  output logic           e_i,
  output logic           order
);

  if (L % K != 0) begin : g_bad_l
    $error("mpl_ctrl: L must be a multiple of K");
  end

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_PSTART, S_PWAIT} state_e;

  state_e                 state;
  logic [EAW-1:0]         widx;
  logic [$clog2(RL+1):0]  fcnt;
  logic [K-1:0]           ebuf;
  logic [$clog2(K+1)-1:0] bits_left;
  logic                   done_q, order_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      widx      <= '0;
      fcnt      <= '0;
      ebuf      <= '0;
      bits_left <= '0;
      done_q    <= 1'b0;
      order_q   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          widx    <= EAW'(EW - 1);
          fcnt    <= '0;
          done_q  <= 1'b0;
          order_q <= 1'b0;
          state   <= S_FETCH;
        end
        S_FETCH: begin
          fcnt <= fcnt + 1'b1;
          if (fcnt == ($bits(fcnt))'(RL)) begin
            ebuf      <= e_dout;
            bits_left <= ($clog2(K+1))'(K);
            fcnt      <= '0;
            state     <= S_PSTART;
          end
        end
        S_PSTART: state <= S_PWAIT;
        S_PWAIT: if (mmd_done) begin
          order_q   <= ~order_q;
          ebuf      <= ebuf << 1;
          bits_left <= bits_left - 1'b1;
          if (bits_left != 1) begin
            state <= S_PSTART;
          end else if (widx != '0) begin
            widx  <= widx - 1'b1;
            state <= S_FETCH;
          end else begin
            done_q <= 1'b1;
            state  <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy      = (state != S_IDLE);
  assign done      = done_q;
  assign e_addr    = widx;
  assign mmd_start = (state == S_PSTART);
  assign e_i       = ebuf[K-1];
  assign order     = order_q;

endmodule
