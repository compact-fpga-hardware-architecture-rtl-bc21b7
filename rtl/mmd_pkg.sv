// mmd_pkg: types shared by the digit-digit Montgomery multiplier (MMD) and
// the Montgomery Powering Ladder (MPL) exponentiator.
//
// mmd_token_t is the control token the Montgomery sequencer (mmd_ctrl) issues
// once per clock together with the memory read addresses. It travels down a
// short delay line so that each pipeline stage of the datapath (s, q/c/t,
// write-back) sees the token that belongs to the digits it is processing.
//   kind  : SLOT_FIRST - the q-computation slot that opens an outer iteration
//                        (digit 0 is read twice; this is the first read)
//           SLOT_MAIN  - inner step j, produces t<j>
//           SLOT_PAD   - idle slot that spaces iterations apart when there
//                        are fewer than RL+4 digits
//           SLOT_FLUSH - the extra slot after the last iteration
//   wc    : this slot's write-back stage stores the final carry c<n>
//   last  : this slot's write-back ends the product (done)
//   i_is0 : outer iteration i = 0, where the accumulator A is taken as 0
//   j     : inner digit index
// The width of j is fixed at 16 bits, enough for 65535 digits.
package mmd_pkg;

  localparam int unsigned JW = 16;

  typedef enum logic [1:0] {SLOT_FIRST, SLOT_MAIN, SLOT_PAD, SLOT_FLUSH} slot_e;

  typedef struct packed {
    logic          valid;
    slot_e         kind;
    logic          wc;
    logic          last;
    logic          i_is0;
    logic [JW-1:0] j;
  } mmd_token_t;

  // AXI4-Lite register map of the exponentiator (byte addresses, 32-bit words).
  // Bits [15:12] of the address select a region; bits [11:2] are the word
  // (digit) index inside a memory region.
  typedef enum logic [3:0] {
    REG_CTRL_STATUS = 4'h0,  // word 0: CTRL/STATUS, word 1: p'
    MEM_P           = 4'h1,  // modulus p, digit i at word i
    MEM_E           = 4'h2,  // exponent e, word w holds bits [k*w +: k]
    MEM_X           = 4'h3,  // write: 1 in Montgomery form; read: result
    MEM_Y           = 4'h4   // write: g in Montgomery form; read: ladder R1
  } region_e;

endpackage
