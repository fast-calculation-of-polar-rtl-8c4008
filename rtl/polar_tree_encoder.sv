// polar_tree_encoder: one tree encoding structure. Computes the polar code
// bit x_k of the information word u without a generator matrix.
//
// The tree has n = log2(N) levels above the ground level, where u_0..u_{N-1}
// enter. Each node joins a left and a right input from the level below.
// Level j (level 0 at the top) is labelled with bit j of the counter value k:
//   label 1 -> pass-node: forwards the right (higher-index) input,
//   label 0 -> sum-node:  forwards the mod-2 sum of both inputs.
// The output of the single level-0 node is x_k. The result equals
// x = u * B_N * F^{(x)n}, the bit-reversed Arikan encoder.
//
// Implementation: the tree is evaluated in place on an N-bit vector. After
// the bottom t+1 levels have been processed, the node whose subtree covers
// u indices p-2^(t+1)+1 .. p sits at position p (p with bits 0..t all set).
// A sum level therefore is v ^ (v << 2^t); a pass level leaves v unchanged,
// since the right child already sits at the parent's position. Positions
// that do not hold a node are never read and are removed by synthesis, as
// are left subtrees under pass levels when k is a constant.
//
// Interface: purely combinational, u and k in, x out.
module polar_tree_encoder #(
  parameter int unsigned N  = 1024,
  localparam int unsigned NB = $clog2(N)
) (
  input  logic [N-1:0]  u,
  input  logic [NB-1:0] k,
  output logic          x
);

  logic [N-1:0] v;

  always_comb begin
    v = u;
    // t = 0 is the lowest level (level n-1, labelled by the MSB of k).
    for (int unsigned t = 0; t < NB; t++) begin
      if (!k[NB-1-t]) v = v ^ (v << (1 << t));
    end
    x = v[N-1];
  end

endmodule
