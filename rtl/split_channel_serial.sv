// split_channel_serial: computes the error probability of every split
// channel u_0 .. u_{N-1}, one per clock cycle, and decides which bit
// locations carry data and which are frozen.
//
// As in the encoder, an n-bit counter starts at zero and its value k labels
// the levels of one error-probability tree (split_channel_tree); the tree's
// result p_e(u_k) is compared with the threshold pte, and the decision is
// written to the frozen/data location memory through the wr_* port. The
// counter then advances until k = N-1.
//
// Interface and timing (this design's choice):
//   start    - one-cycle request, accepted when idle; alpha and pte are
//              captured on that edge. A start while busy is ignored.
//   busy     - high for exactly N cycles starting the cycle after start.
//   pe_valid - equals busy; pe / pe_index / is_data describe split channel
//              pe_index in that cycle.
//   wr_en, wr_addr, wr_data - memory write of is_data at pe_index, one per
//              busy cycle (1 = data bit, 0 = frozen bit).
//   done     - one-cycle pulse in the cycle holding the last channel.
// rst_n is an asynchronous active-low reset.
module split_channel_serial #(
  parameter int unsigned N    = 1024,
  parameter int unsigned FRAC = 16,
  localparam int unsigned NB  = $clog2(N),
  localparam int unsigned W   = FRAC + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [W-1:0]  alpha,
  input  logic [W-1:0]  pte,
  output logic          busy,
  output logic          pe_valid,
  output logic [W-1:0]  pe,
  output logic [NB-1:0] pe_index,
  output logic          is_data,
  output logic          wr_en,
  output logic [NB-1:0] wr_addr,
  output logic          wr_data,
  output logic          done
);

  logic [W-1:0]  alpha_reg;
  logic [W-1:0]  pte_reg;
  logic [NB-1:0] k;
  logic          k_last;
  logic          accept;

  assign accept = start && !busy;

  polar_counter #(.N(N)) u_counter (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (accept),
    .en    (busy),
    .count (k),
    .last  (k_last)
  );

  split_channel_tree #(.N(N), .FRAC(FRAC)) u_tree (
    .alpha   (alpha_reg),
    .pte     (pte_reg),
    .k       (k),
    .pe      (pe),
    .is_data (is_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alpha_reg <= '0;
      pte_reg   <= '0;
      busy      <= 1'b0;
    end else if (accept) begin
      alpha_reg <= alpha;
      pte_reg   <= pte;
      busy      <= 1'b1;
    end else if (busy && k_last) begin
      busy      <= 1'b0;
    end
  end

  assign pe_valid = busy;
  assign pe_index = k;
  assign wr_en    = busy;
  assign wr_addr  = k;
  assign wr_data  = is_data;
  assign done     = busy && k_last;

endmodule
