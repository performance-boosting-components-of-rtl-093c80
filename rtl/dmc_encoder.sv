// Decimal Matrix Code (DMC) encoder for a 32-bit word.
//
// Horizontal check bits are decimal (integer) sums of pairs of 4-bit symbols
// in the same row, two symbols apart:
//     h[4:0]   = d[3:0]   + d[11:8]      h[9:5]   = d[7:4]   + d[15:12]
//     h[14:10] = d[19:16] + d[27:24]     h[19:15] = d[23:20] + d[31:28]
// each done by a 4-bit Brent-Kung adder whose carry out is the fifth bit.
// Vertical check bits are the XOR of the two bits in each column:
//     v[i] = d[i] ^ d[i+16],  i = 0..15.
// The data passes through unchanged as u.
//
// Interface: d (32 bits) -> cw (dmc_codeword_t: h, v, u). Purely
// combinational. The decoder instantiates the same module to recompute the
// check bits of a received word. The check-bit equations are the document's;
// using the Brent-Kung adder for the "Adder" boxes is this design's choice.
module dmc_encoder
  import dmc_pkg::*;
(
  input  logic [DATA_W-1:0] d,
  output dmc_codeword_t     cw
);
  // Group g adds symbol s and symbol s+2, where s = {0, 1, 4, 5}[g].
  for (genvar g = 0; g < NGRP; g++) begin : g_hsum
    localparam int unsigned S = (g / 2) * 4 + (g % 2);
    logic [SYM_W-1:0] s4;
    logic             c4;
    bk_adder #(.W(SYM_W)) u_add (
      .a(d[S*SYM_W +: SYM_W]), .b(d[(S+2)*SYM_W +: SYM_W]), .cin(1'b0),
      .sum(s4), .cout(c4)
    );
    assign cw.h[g*HSUM_W +: HSUM_W] = {c4, s4};
  end

  assign cw.v = d[V_W-1:0] ^ d[DATA_W-1:V_W];
  assign cw.u = d;
endmodule
