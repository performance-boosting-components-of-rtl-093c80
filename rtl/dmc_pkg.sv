// Shared sizes and the codeword type of the Decimal Matrix Code (DMC).
//
// A 32-bit data word is seen as eight 4-bit symbols in a 2 x 4 matrix:
// symbols 0..3 (bits 15..0) form row 0, symbols 4..7 (bits 31..16) row 1.
// The codeword holds the data (u), 20 horizontal check bits (h: four 5-bit
// sums of symbol pairs) and 16 vertical check bits (v: one parity bit per
// column of the bit matrix).
package dmc_pkg;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned SYM_W  = 4;
  localparam int unsigned HSUM_W = SYM_W + 1;   // one horizontal sum
  localparam int unsigned NGRP   = 4;           // horizontal sums per word
  localparam int unsigned H_W    = NGRP * HSUM_W;  // 20
  localparam int unsigned V_W    = DATA_W / 2;     // 16

  typedef struct packed {
    logic [H_W-1:0]    h;
    logic [V_W-1:0]    v;
    logic [DATA_W-1:0] u;
  } dmc_codeword_t;

  localparam int unsigned CW_W = $bits(dmc_codeword_t);  // 68
endpackage
