// Normaliser of the floating point multiplier.
//
// Takes the 2*(MAN_W+1)-bit product of two significands 1.M (a value in
// [1, 4) with the binary point after its two top bits) and the exponent sum
// from the exponent unit, and produces the final exponent and fraction:
//   - normalise: if the product is 2 or more, the binary point moves one place
//     left and the exponent is incremented, so the result has a 1 before the
//     point, which is then dropped (hidden bit);
//   - round: round to nearest, ties to even, using the guard bit below the
//     kept fraction and a sticky OR of all lower bits; a carry out of the
//     rounding increments the exponent again;
//   - check: a biased exponent of 2^EXP_W - 1 or more is an overflow and the
//     result becomes infinity; one of 0 or less is an underflow and the result
//     is flushed to zero.
//
// Interface: prod, e_sum (signed, EXP_W+2 bits) -> exp_o, frac_o, overflow,
// underflow. Purely combinational.
// The four steps (placing the point, normalising, rounding, checking for
// overflow and underflow) are the document's; the rounding mode and the
// responses to overflow (infinity) and underflow (zero, no subnormals) are
// this design's choices, as the document does not name them.
module fp_normalizer #(
  parameter int unsigned EXP_W = 11,
  parameter int unsigned MAN_W = 52
) (
  input  logic [2*MAN_W+1:0]      prod,
  input  logic signed [EXP_W+1:0] e_sum,
  output logic [EXP_W-1:0]        exp_o,
  output logic [MAN_W-1:0]        frac_o,
  output logic                    overflow,
  output logic                    underflow
);
  localparam logic signed [EXP_W+1:0] EMAX = (EXP_W+2)'((1 << EXP_W) - 1);  // all-ones exponent

  logic                    shift;      // product >= 2
  logic [MAN_W-1:0]        frac_t;     // truncated fraction
  logic                    guard, sticky, round_up;
  logic [MAN_W:0]          frac_r;     // rounded fraction with carry
  logic signed [EXP_W+1:0] e_norm, e_fin;

  always_comb begin
    shift = prod[2*MAN_W+1];
    if (shift) begin
      frac_t = prod[2*MAN_W:MAN_W+1];
      guard  = prod[MAN_W];
      sticky = |prod[MAN_W-1:0];
    end else begin
      frac_t = prod[2*MAN_W-1:MAN_W];
      guard  = prod[MAN_W-1];
      sticky = |prod[MAN_W-2:0];
    end
    e_norm   = e_sum + (EXP_W+2)'(shift);
    round_up = guard & (sticky | frac_t[0]);
    frac_r   = {1'b0, frac_t} + (MAN_W+1)'(round_up);
    // A carry out leaves the fraction all zeros: 10.000... = 1.000... * 2.
    e_fin    = e_norm + (EXP_W+2)'(frac_r[MAN_W]);

    overflow  = (e_fin >= EMAX);
    underflow = (e_fin <= 0);
    if (overflow) begin
      exp_o  = '1;
      frac_o = '0;
    end else if (underflow) begin
      exp_o  = '0;
      frac_o = '0;
    end else begin
      exp_o  = e_fin[EXP_W-1:0];
      frac_o = frac_r[MAN_W-1:0];
    end
  end
endmodule
