// Exponent calculation unit of the floating point multiplier.
//
// Adds the two biased exponents and removes one bias:
//     e_sum = ea + eb - BIAS
// Both steps use the Brent-Kung adder: the first adds the zero-extended
// exponents, the second adds the one's complement of BIAS with a carry in of
// one (a subtraction). The result is a two's complement number of EXP_W+2
// bits, wide enough for every sum (from -BIAS up to 2*(2^EXP_W - 1) - BIAS),
// so the normaliser can see overflow and underflow.
//
// Interface: ea, eb (EXP_W bits, biased) -> e_sum (EXP_W+2 bits, signed).
// Purely combinational. The operation (E1 + E2 - bias) and the use of the
// Brent-Kung adder are the document's; the default EXP_W = 11 is the IEEE 754
// double precision exponent, matching the 64-bit multiplier the document
// presents. The signed EXP_W+2 bit output is this design's choice.
module fp_exponent_unit #(
  parameter int unsigned EXP_W = 11,
  parameter int unsigned BIAS  = (1 << (EXP_W - 1)) - 1
) (
  input  logic [EXP_W-1:0]        ea,
  input  logic [EXP_W-1:0]        eb,
  output logic signed [EXP_W+1:0] e_sum
);
  localparam int unsigned XW = EXP_W + 2;

  logic [XW-1:0] raw;
  logic [XW-1:0] bias_n;
  logic          c_raw, c_sub;

  assign bias_n = ~XW'(BIAS);

  bk_adder #(.W(XW)) u_add (
    .a({2'b00, ea}), .b({2'b00, eb}), .cin(1'b0), .sum(raw), .cout(c_raw)
  );
  bk_adder #(.W(XW)) u_sub (
    .a(raw), .b(bias_n), .cin(1'b1), .sum(e_sum), .cout(c_sub)
  );
endmodule
