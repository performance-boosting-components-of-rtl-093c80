// Unsigned N x N Urdhva-Tiryagbhyam ("vertically and crosswise") multiplier.
//
// Each operand is split into a high and a low half. The four half-size
// products are formed in parallel - the two vertical ones (low x low,
// high x high) and the two crosswise ones (high x low, low x high) - and then
// combined:
//     p = q_ll + (q_hl + q_lh) << N/2 + q_hh << N
// The two crosswise products are added by an N-bit Brent-Kung adder; their
// sum (with its carry) is then added to {q_hh, upper half of q_ll} by an
// (N + N/2)-bit Brent-Kung adder, and the lower half of q_ll passes straight
// to the result. The half-size multipliers are this same module, so the
// structure recurses down to the 2 x 2 Urdhva cell, which is built from AND
// gates and two half adders.
//
// Interface: a, b (N bits, unsigned) -> p (2N bits). Purely combinational.
// N must be a power of two, at least 2. The default of 64 is the operand width
// of the document's multiplier diagram (a 64-bit multiplier made of four
// 32 x 32 multipliers); the floating point multiplier uses it for the 53-bit
// double precision significands. Recursion down to the 2 x 2 cell and the use
// of Brent-Kung adders at every level are this design's reading of the
// document's "vertical and crosswise" description.
//
// A lint run of Verilator reports a, b unused and the four partial products
// undriven "in instance 'vedic_mul'": that is the unelaborated template it
// keeps for a self-instantiating module, not the elaborated hardware, in
// which every partial product is driven by a sub-multiplier (the testbench
// checks the full 64 x 64 product).
module vedic_mul #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("vedic_mul: N must be a power of two, at least 2");
  end

  if (N == 2) begin : g_cell
    // 2 x 2 Urdhva cell: vertical a0b0, crosswise a1b0 + a0b1, vertical a1b1.
    logic c1;
    assign p[0] = a[0] & b[0];
    assign p[1] = (a[1] & b[0]) ^ (a[0] & b[1]);
    assign c1   = (a[1] & b[0]) & (a[0] & b[1]);
    assign p[2] = (a[1] & b[1]) ^ c1;
    assign p[3] = (a[1] & b[1]) & c1;
  end else begin : g_split
    localparam int unsigned H = N / 2;

    logic [N-1:0] q_ll, q_hl, q_lh, q_hh;  // vertical and crosswise products
    logic [N-1:0] xsum;                   // q_hl + q_lh, low N bits
    logic         xsum_c;                 // ... and its carry
    logic [N+H-1:0] upper;                 // result bits 2N-1 .. H

    vedic_mul #(.N(H)) u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(q_ll));
    vedic_mul #(.N(H)) u_hl (.a(a[N-1:H]), .b(b[H-1:0]), .p(q_hl));
    vedic_mul #(.N(H)) u_lh (.a(a[H-1:0]), .b(b[N-1:H]), .p(q_lh));
    vedic_mul #(.N(H)) u_hh (.a(a[N-1:H]), .b(b[N-1:H]), .p(q_hh));

    bk_adder #(.W(N)) u_add_cross (
      .a(q_hl), .b(q_lh), .cin(1'b0), .sum(xsum), .cout(xsum_c)
    );

    // The sum fits in 2N bits, so the carry out of this adder is always 0.
    logic unused_c;
    bk_adder #(.W(N + H)) u_add_upper (
      .a({q_hh, q_ll[N-1:H]}),
      .b({{(H-1){1'b0}}, xsum_c, xsum}),
      .cin(1'b0), .sum(upper), .cout(unused_c)
    );

    assign p = {upper, q_ll[H-1:0]};
  end
endmodule
