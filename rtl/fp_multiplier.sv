// IEEE 754 floating point multiplier with a Vedic significand multiplier.
//
// Four units work side by side on the two operands a and b:
//   - sign unit: s = s1 XOR s2;
//   - exponent unit (fp_exponent_unit): e1 + e2 - bias with Brent-Kung adders;
//   - mantissa unit (vedic_mul): the significands 1.M1 and 1.M2, zero-extended
//     to the next power of two (64 bits for double precision), are multiplied
//     by the Urdhva-Tiryagbhyam multiplier;
//   - normaliser (fp_normalizer): normalises, rounds to nearest even and
//     checks for overflow and underflow.
// Special operands are handled around this datapath: an exponent field of 0
// (zero or subnormal) counts as zero, an all-ones exponent with a zero
// fraction is infinity, and one with a non-zero fraction is NaN. NaN in, or
// infinity times zero, gives the quiet NaN (sign 0, exponent all ones,
// fraction MSB set); infinity times a finite non-zero number gives infinity.
// Overflow gives infinity and raises overflow; underflow gives zero and raises
// underflow.
//
// Interface: a, b -> y (EXP_W+MAN_W+1 bits each), overflow, underflow.
// Purely combinational, as is the document's multiplier.
// The unit structure, the sign/exponent/significand steps and the Vedic and
// Brent-Kung components follow the document; the default format is IEEE 754
// double precision (64 bits), the size of the multiplier the document
// evaluates, and EXP_W = 8, MAN_W = 23 gives single precision. Subnormal
// flushing, NaN/infinity handling and the rounding mode are this design's.
module fp_multiplier #(
  parameter int unsigned EXP_W = 11,
  parameter int unsigned MAN_W = 52
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  output logic [EXP_W+MAN_W:0] y,
  output logic                 overflow,
  output logic                 underflow
);
  localparam int unsigned SIG_W = MAN_W + 1;
  localparam int unsigned VN    = 1 << $clog2(SIG_W);  // Vedic multiplier width

  logic             sa, sb, s;
  logic [EXP_W-1:0] ea, eb;
  logic [MAN_W-1:0] ma, mb;

  assign {sa, ea, ma} = a;
  assign {sb, eb, mb} = b;

  // Sign unit.
  assign s = sa ^ sb;

  // Exponent unit.
  logic signed [EXP_W+1:0] e_sum;
  fp_exponent_unit #(.EXP_W(EXP_W)) u_exp (.ea(ea), .eb(eb), .e_sum(e_sum));

  // Mantissa unit.
  logic [VN-1:0]   siga, sigb;
  logic [2*VN-1:0] prod_full;
  assign siga = VN'({1'b1, ma});
  assign sigb = VN'({1'b1, mb});
  vedic_mul #(.N(VN)) u_mant (.a(siga), .b(sigb), .p(prod_full));

  // Normaliser.
  logic [EXP_W-1:0] exp_n;
  logic [MAN_W-1:0] frac_n;
  logic             ovf_n, unf_n;
  fp_normalizer #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_norm (
    .prod(prod_full[2*SIG_W-1:0]), .e_sum(e_sum),
    .exp_o(exp_n), .frac_o(frac_n), .overflow(ovf_n), .underflow(unf_n)
  );

  // Special operands.
  logic zero_a, zero_b, inf_a, inf_b, nan_a, nan_b;
  assign zero_a = (ea == '0);
  assign zero_b = (eb == '0);
  assign inf_a  = (ea == '1) && (ma == '0);
  assign inf_b  = (eb == '1) && (mb == '0);
  assign nan_a  = (ea == '1) && (ma != '0);
  assign nan_b  = (eb == '1) && (mb != '0);

  always_comb begin
    overflow  = 1'b0;
    underflow = 1'b0;
    if (nan_a || nan_b || (inf_a && zero_b) || (inf_b && zero_a)) begin
      y = {1'b0, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};
    end else if (inf_a || inf_b) begin
      y = {s, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    end else if (zero_a || zero_b) begin
      y = {s, {(EXP_W+MAN_W){1'b0}}};
    end else begin
      y         = {s, exp_n, frac_n};
      overflow  = ovf_n;
      underflow = unf_n;
    end
  end
endmodule
