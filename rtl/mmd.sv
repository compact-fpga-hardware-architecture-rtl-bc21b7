// mmd: datapath of the digit-digit Montgomery multiplier (the MMD box).
//
// It evaluates one inner step of the iterative Montgomery product
// (radix beta = 2^K) per clock:
//   s<j>       = A_j + X_j * Y_i                (multiplier 1, first 2K-bit adder)
//   q<i>       = (s<0> * p') mod beta           (multiplier 2, j = 0 only)
//   r<j>       = q<i> * p_j                     (multiplier 3)
//   {c,t}<j>   = s<j> + r<j> + c<j>             (second adder, 2K+1 bits)
// and returns either t<j> (written to A_(j-1)) or the final carry c<n>
// (written to A_(n-1)) on the digit output r_out. The block has three K x K
// multipliers, two adders and the four registers s, q, c and t, as the
// document draws it; it holds no operand storage: all digits arrive from
// block RAMs and the result digits go back to a block RAM.
//
// Timing: every register is loaded at the clock edge when its enable is
// high; the enables come from mmd_ctrl, one pipeline stage apart:
//   s_en  loads s from x_j, y_i, a_j (a_zero forces A_j to 0, used in outer
//         iteration 0 so the result memory needs no clearing);
//   q_en  loads q from the s register (the j = 0 slot);
//   e_en  loads c and t from s, q*p_j and c (c_clr takes c<0> = 0);
//   sel_c selects c (low K bits) instead of t for r_out.
// The carry register is K+1 bits wide as drawn. Only K bits of c are written
// back; with 4p < beta^n the top bit of c<n> is always 0.
module mmd #(
  parameter int unsigned K = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] x_j,
  input  logic [K-1:0] y_i,
  input  logic [K-1:0] a_j,
  input  logic [K-1:0] p_j,
  input  logic [K-1:0] p_prime,
  input  logic         a_zero,
  input  logic         s_en,
  input  logic         q_en,
  input  logic         e_en,
  input  logic         c_clr,
  input  logic         sel_c,
  output logic [K-1:0] r_out
);

  logic [2*K-1:0] s_q;
  logic [K-1:0]   q_q;
  logic [K:0]     c_q;
  logic [K-1:0]   t_q;

  logic [2*K-1:0] mult1;   // X_j * Y_i
  logic [2*K-1:0] mult2;   // s * p'
  logic [2*K-1:0] mult3;   // q * p_j  (r<j>)
  logic [2*K-1:0] s_next;
  logic [2*K:0]   sum2;

  always_comb begin
    mult1  = {{K{1'b0}}, x_j} * {{K{1'b0}}, y_i};
    mult2  = {{K{1'b0}}, s_q[K-1:0]} * {{K{1'b0}}, p_prime};
    mult3  = {{K{1'b0}}, q_q} * {{K{1'b0}}, p_j};
    s_next = mult1 + {{K{1'b0}}, (a_zero ? '0 : a_j)};
    sum2   = {1'b0, s_q} + {1'b0, mult3}
           + {{K{1'b0}}, (c_clr ? {(K+1){1'b0}} : c_q)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= '0;
      q_q <= '0;
      c_q <= '0;
      t_q <= '0;
    end else begin
      if (s_en) s_q <= s_next;
      if (q_en) q_q <= mult2[K-1:0];
      if (e_en) begin
        c_q <= sum2[2*K:K];
        t_q <= sum2[K-1:0];
      end
    end
  end

  assign r_out = sel_c ? c_q[K-1:0] : t_q;

endmodule
