// Decimal Matrix Code (DMC) decoder for a 32-bit word.
//
// From a received codeword (h, v, u) the decoder
//   1. recomputes the check bits of the received data u with the encoder
//      (h' and v');
//   2. syndrome calculator: vertical syndrome s = v ^ v' (one bit per
//      column) and horizontal syndromes dh[g] = h'[g] - h[g] (5-bit
//      Brent-Kung subtractors, one per symbol pair);
//   3. error locator: data bit i (row r = i/16, symbol k = i/4) is in error
//      when its column syndrome s[i mod 16] is 1 and the horizontal syndrome
//      of its symbol pair is non-zero; the pair of symbol k is
//      g = 2*(k/4) + (k mod 2);
//   4. error corrector: each located bit is inverted, d_o[i] = u[i] ^ s[i].
// An error in the check bits alone leaves the data as received, because it
// makes only one kind of syndrome non-zero. err_detected is set when any
// syndrome is non-zero; err_corrected when at least one data bit was
// inverted.
//
// Interface: cw (dmc_codeword_t) -> d_o (32 bits), err_detected,
// err_corrected. Purely combinational.
// The syndrome, detection and correction equations and the three sub-blocks
// follow the document; the row-selection rule of the locator (the symbol
// pair's horizontal syndrome must be non-zero) and the two flags are this
// design's reading, as the document only prints the correction for bit 0.
module dmc_decoder
  import dmc_pkg::*;
(
  input  dmc_codeword_t     cw,
  output logic [DATA_W-1:0] d_o,
  output logic              err_detected,
  output logic              err_corrected
);
  dmc_codeword_t    re;         // check bits recomputed from the data
  logic [V_W-1:0]   s;          // vertical syndrome
  logic [NGRP-1:0]  dh_nz;      // horizontal syndrome non-zero, per pair
  logic [DATA_W-1:0] loc;       // error locator

  dmc_encoder u_reenc (.d(cw.u), .cw(re));

  // Syndrome calculator.
  assign s = cw.v ^ re.v;
  for (genvar g = 0; g < NGRP; g++) begin : g_hsyn
    logic [HSUM_W-1:0] dh;
    logic              c_unused;
    bk_adder #(.W(HSUM_W)) u_sub (
      .a(re.h[g*HSUM_W +: HSUM_W]), .b(~cw.h[g*HSUM_W +: HSUM_W]), .cin(1'b1),
      .sum(dh), .cout(c_unused)
    );
    assign dh_nz[g] = |dh;
  end

  // Error locator and corrector.
  for (genvar i = 0; i < DATA_W; i++) begin : g_loc
    localparam int unsigned K = i / SYM_W;
    localparam int unsigned G = 2 * (K / 4) + (K % 2);
    assign loc[i] = s[i % V_W] & dh_nz[G];
  end

  assign d_o           = cw.u ^ loc;
  assign err_detected  = (|s) | (|dh_nz);
  assign err_corrected = |loc;
endmodule
