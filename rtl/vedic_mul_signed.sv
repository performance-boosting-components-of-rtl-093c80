// Signed fractional Vedic multiplier (sign-magnitude in, two's complement out).
//
// Each W-bit operand is a sign bit (bit W-1) and a W-1 bit magnitude holding a
// fraction (format Q0.(W-1)). The magnitudes, zero-extended to W bits, are
// split into halves and multiplied by four W/2 x W/2 Urdhva multipliers
// (high x high, low x high, high x low, low x low). The two crosswise
// products are added, and the result is added to the vertical products to
// give the 2W-bit magnitude product P. The XOR of the two sign bits enables a
// two's complement of P (inversion plus one, done with a Brent-Kung adder).
// Bit 2W-1 of the result only repeats the sign (a redundant sign bit), so the
// W-bit result is taken from bits 2W-2 .. W-1: again a sign bit followed by
// W-1 fraction bits. The lower fraction bits are dropped (truncation of the
// two's complement value, i.e. rounding toward minus infinity).
//
// Interface: x, y (W bits) -> r (W bits), purely combinational.
// The operand split, the sign XOR enabling a two's complement stage, the
// redundant sign bit and the choice of result bits P126..P63 follow the
// document's 64-bit multiplier diagram. Reading the operands as sign-magnitude
// fractions (the diagram feeds the magnitude bits with a 0 on top into the
// multipliers) is this design's interpretation.
module vedic_mul_signed #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] r
);
  localparam int unsigned H = W / 2;

  logic         neg;
  logic [W-1:0] mx, my;                 // magnitudes with a 0 on top
  logic [W-1:0] q_hh, q_lh, q_hl, q_ll;
  logic [W-1:0] xsum;
  logic         xsum_c;
  logic [W+H-1:0] upper;
  logic [2*W-1:0] pmag;                 // magnitude product P
  logic [2*W-1:0] pres;                 // signed product
  logic           c_hi, c_neg;

  assign neg = x[W-1] ^ y[W-1];
  assign mx  = {1'b0, x[W-2:0]};
  assign my  = {1'b0, y[W-2:0]};

  vedic_mul #(.N(H)) u_hh (.a(mx[W-1:H]), .b(my[W-1:H]), .p(q_hh));
  vedic_mul #(.N(H)) u_lh (.a(mx[W-1:H]), .b(my[H-1:0]), .p(q_lh));
  vedic_mul #(.N(H)) u_hl (.a(mx[H-1:0]), .b(my[W-1:H]), .p(q_hl));
  vedic_mul #(.N(H)) u_ll (.a(mx[H-1:0]), .b(my[H-1:0]), .p(q_ll));

  bk_adder #(.W(W)) u_add_cross (
    .a(q_lh), .b(q_hl), .cin(1'b0), .sum(xsum), .cout(xsum_c)
  );
  bk_adder #(.W(W + H)) u_add_upper (
    .a({q_hh, q_ll[W-1:H]}),
    .b({{(H-1){1'b0}}, xsum_c, xsum}),
    .cin(1'b0), .sum(upper), .cout(c_hi)
  );
  assign pmag = {upper, q_ll[H-1:0]};

  // Two's complement stage, enabled by the sign: (P ^ {neg}) + neg.
  bk_adder #(.W(2 * W)) u_twos (
    .a(pmag ^ {(2*W){neg}}), .b('0), .cin(neg), .sum(pres), .cout(c_neg)
  );

  // pres[2W-1] (redundant sign) and the low fraction bits are not used.
  assign r = pres[2*W-2:W-1];
endmodule
