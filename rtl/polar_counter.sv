// polar_counter: the n-bit binary counter that drives the tree structures.
//
// The counter value k selects the code bit x_k (encoder) or the split
// channel u_k (error-probability calculator): bit j of k labels tree level j,
// the least significant bit being the top level (level 0) and the most
// significant bit the bottom level (level n-1). A '1' marks a level of
// pass-nodes / g-nodes, a '0' a level of sum-nodes / f-nodes.
//
// Interface: 'clear' loads zero, 'en' increments by one (clear wins). 'last'
// is high while the count equals N-1, the final index of a frame; an
// increment from N-1 wraps to 0. Both act on the rising clock edge; rst_n is
// an asynchronous active-low reset to zero. Clearing to zero and
// incrementing once per code bit follow the encoding algorithm; the
// clear/enable handshake and the reset are this design's choice.
module polar_counter #(
  parameter int unsigned N  = 1024,
  localparam int unsigned NB = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          en,
  output logic [NB-1:0] count,
  output logic          last
);

  initial assert (N >= 2 && (1 << NB) == N)
    else $fatal(1, "polar_counter: N must be a power of two, at least 2");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (clear) count <= '0;
    else if (en)    count <= count + 1'b1;
  end

  assign last = (count == NB'(N - 1));

endmodule
