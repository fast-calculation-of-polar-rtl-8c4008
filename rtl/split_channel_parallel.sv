// split_channel_parallel: computes the error probabilities of all N split
// channels, and all data/frozen decisions, at the same time.
//
// N error-probability trees (split_channel_tree) run side by side; tree j
// has its counter input tied to the constant j and so evaluates u_j. All
// trees share alpha and pte.
//
// Interface and timing (this design's choice): on a clock edge with start
// high, every p_e and the data mask are registered; valid and the results
// follow one cycle later. pe[j] is p_e(u_j); data_mask[j] is 1 when u_j is
// a data bit (p_e < pte) and 0 when it is frozen. rst_n is an asynchronous
// active-low reset of valid and of data_mask (to all frozen); pe holds no
// value until the first calculation.
module split_channel_parallel #(
  parameter int unsigned N    = 1024,
  parameter int unsigned FRAC = 16,
  localparam int unsigned NB  = $clog2(N),
  localparam int unsigned W   = FRAC + 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] alpha,
  input  logic [W-1:0] pte,
  output logic         valid,
  output logic [N-1:0][W-1:0] pe,
  output logic [N-1:0] data_mask
);

  logic [N-1:0][W-1:0] pe_comb;
  logic [N-1:0] mask_comb;

  for (genvar j = 0; j < N; j++) begin : g_tree
    split_channel_tree #(.N(N), .FRAC(FRAC)) u_tree (
      .alpha   (alpha),
      .pte     (pte),
      .k       (NB'(j)),
      .pe      (pe_comb[j]),
      .is_data (mask_comb[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid     <= 1'b0;
      data_mask <= '0;
    end else begin
      valid <= start;
      if (start) data_mask <= mask_comb;
    end
  end

  // The probabilities are plain data registers without reset: they are
  // meaningful only after the first valid.
  always_ff @(posedge clk) begin
    if (start) pe <= pe_comb;
  end

endmodule
