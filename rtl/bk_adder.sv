// Brent-Kung parallel-prefix adder.
//
// Computes sum = a + b + cin and the carry out, with no clock (purely
// combinational). The adder works in the three steps of any parallel-prefix
// adder: a pre-processing step forms the bit propagate P[i] = a[i] ^ b[i] and
// generate G[i] = a[i] & b[i]; a carry-generation network combines (G,P)
// pairs with the prefix operator
//     CG[i:j] = G[i:k+1] | (P[i:k+1] & G[k:j]),  CP[i:j] = P[i:k+1] & P[k:j];
// and a post-processing step forms S[i] = P[i] ^ C[i-1].
// The network is the Brent-Kung tree: an up-sweep (a binary reduction tree
// over distances 1, 2, 4, ...) that yields the full prefix at bit positions
// 2^k - 1, followed by a down-sweep that fills in the remaining positions.
// That gives 2*log2(W) - 1 prefix levels and about 2W prefix cells.
// The carry in is folded into bit 0 (G[0] | P[0] & cin), so the prefix
// generate at bit i is directly the carry out of bit i.
//
// The default width of 32 bits is the document's; the equations and the tree
// shape follow it. The loop formulation also accepts widths that are not a
// power of two, which the other blocks of this design use (4, 5, 13, 48 ...).
module bk_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned L = (W > 1) ? $clog2(W) : 1;
  localparam int unsigned NS = 2 * L;  // stages 0..L up-sweep, L+1..2L-1 down-sweep

  logic [W-1:0] p_bit;
  logic [W:0]   carry;

  assign p_bit = a ^ b;

  // One generate block per prefix stage, each holding that stage's group
  // generate g and propagate p.
  //  stage 0          : pre-processing (cin folded into bit 0)
  //  stage l, 1..L    : up-sweep; bit i with (i+1) a multiple of 2^l absorbs
  //                     the group ending 2^(l-1) below it
  //  stage L+k, k>=1  : down-sweep at level LV = L-k; bit i with
  //                     i+1 = m*2^LV + 2^(LV-1), m >= 1, absorbs the complete
  //                     prefix at i - 2^(LV-1)
  for (genvar s = 0; s < NS; s++) begin : g_st
    logic [W-1:0] g, p;
    if (s == 0) begin : g_pre
      assign g = {a[W-1:1] & b[W-1:1], (a[0] & b[0]) | (p_bit[0] & cin)};
      assign p = p_bit;
    end else begin : g_net
      localparam bit          UP = (s <= L);
      localparam int unsigned LV = UP ? s : (2 * L - s);
      localparam int unsigned D  = 1 << (LV - 1);
      for (genvar i = 0; i < W; i++) begin : g_bit
        localparam bit CELL = UP ? (((i + 1) % (1 << LV)) == 0)
                                 : ((((i + 1) % (1 << LV)) == D) && ((i + 1) > (1 << LV)));
        if (CELL) begin : g_cell
          assign g[i] = g_st[s-1].g[i] | (g_st[s-1].p[i] & g_st[s-1].g[i - D]);
          assign p[i] = g_st[s-1].p[i] & g_st[s-1].p[i - D];
        end else begin : g_pass
          assign g[i] = g_st[s-1].g[i];
          assign p[i] = g_st[s-1].p[i];
        end
      end
    end
  end

  // Post-processing.
  assign carry = {g_st[NS-1].g, cin};
  assign sum   = p_bit ^ carry[W-1:0];
  assign cout  = carry[W];
endmodule
