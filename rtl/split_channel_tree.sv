// split_channel_tree: error-probability tree for one split channel u_k.
//
// Every ground-level input of the tree carries the channel parameter alpha
// (a Bhattacharyya parameter or an average bit-error probability). Level j
// is labelled with bit j of k (LSB = top level 0, MSB = bottom level n-1).
// Going upwards from the bottom level, a node applies
//   f(x) = 2x - x^2   where the level label is 0,
//   g(x) = x^2        where the level label is 1,
// and the top node gives p_e, the (maximum or average) bit-error probability
// of u_k. This is the recursion Z(W_2N^(2i)) = 2Z - Z^2 (bound) and
// Z(W_2N^(2i+1)) = Z^2 applied from the MSB of k downwards.
//
// Because all ground inputs are equal, all nodes of one level carry the
// same value, so the tree is realised with one node per level: a chain of n
// square/f-g stages. The top value is compared with the threshold pte:
// u_k is a data bit if p_e < pte, a frozen bit otherwise.
//
// Number format (this design's choice): unsigned fixed point with FRAC
// fractional bits, width FRAC+1, 1.0 = 2^FRAC. Squares are truncated.
// f is computed as 2x - trunc(x^2), which equals 1 - trunc((1-x)^2) and
// therefore never exceeds 1.0. alpha and pte must lie in [0, 1.0].
//
// Interface: purely combinational, n multiplier stages deep.
module split_channel_tree #(
  parameter int unsigned N    = 1024,
  parameter int unsigned FRAC = 16,
  localparam int unsigned NB  = $clog2(N),
  localparam int unsigned W   = FRAC + 1
) (
  input  logic [W-1:0]  alpha,
  input  logic [W-1:0]  pte,
  input  logic [NB-1:0] k,
  output logic [W-1:0]  pe,
  output logic          is_data
);

  // lvl[t] is the value leaving the t-th level counted from the bottom.
  logic [W-1:0]   lvl [NB+1];
  logic [2*W-1:0] prod [NB];
  logic [W-1:0]   sq   [NB];

  assign lvl[0] = alpha;

  for (genvar t = 0; t < NB; t++) begin : g_level
    assign prod[t] = lvl[t] * lvl[t];
    assign sq[t]   = W'(prod[t] >> FRAC);
    // Label of this level is bit (NB-1-t) of k.
    assign lvl[t+1] = k[NB-1-t] ? sq[t]
                                : W'({lvl[t], 1'b0} - {1'b0, sq[t]});
  end

  assign pe      = lvl[NB];
  assign is_data = (pe < pte);

endmodule
