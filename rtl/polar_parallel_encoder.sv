// polar_parallel_encoder: computes all N polar code bits at the same time.
//
// N tree encoding structures (polar_tree_encoder) run side by side; tree j
// has its counter input tied to the constant j, so it always produces x_j.
// With a constant label vector every pass level keeps only the right half
// of the tree below it, so synthesis removes the unused left subtrees (for
// odd j, for example, the whole left half of the tree).
//
// Interface and timing (this design's choice): when in_valid is high the
// code word of u_in is registered; out_valid and x_out follow one clock
// cycle later. x_out[j] is code bit x_j. rst_n is an asynchronous
// active-low reset.
module polar_parallel_encoder #(
  parameter int unsigned N  = 1024,
  localparam int unsigned NB = $clog2(N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] u_in,
  output logic         out_valid,
  output logic [N-1:0] x_out
);

  logic [N-1:0] x_comb;

  for (genvar j = 0; j < N; j++) begin : g_tree
    polar_tree_encoder #(.N(N)) u_tree (
      .u (u_in),
      .k (NB'(j)),
      .x (x_comb[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      x_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) x_out <= x_comb;
    end
  end

endmodule
