// polar_serial_encoder: generator-matrix-free polar encoder that produces
// the code bits x_0 .. x_{N-1} one per clock cycle.
//
// It follows the counter-driven encoding algorithm: an n-bit counter starts
// at zero, its value k labels the levels of one tree encoding structure
// (polar_tree_encoder), the tree produces x_k, and the counter is
// incremented for the next code bit until k = N-1. Only the information
// word (N bits) and the counter (n bits) are stored; no generator matrix.
//
// Interface and timing (this design's choice):
//   start   - one-cycle request, accepted when idle (busy low); u_in is
//             captured on that edge. A start while busy is ignored.
//   busy    - high from the cycle after start for exactly N cycles.
//   x_valid - equals busy; x_bit is code bit number x_index in that cycle.
//             x_0 appears one cycle after start, x_{N-1} N cycles after.
//   x_last  - marks x_{N-1}.
// rst_n is an asynchronous active-low reset.
module polar_serial_encoder #(
  parameter int unsigned N  = 1024,
  localparam int unsigned NB = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  u_in,
  output logic          busy,
  output logic          x_valid,
  output logic          x_bit,
  output logic [NB-1:0] x_index,
  output logic          x_last
);

  logic [N-1:0]  u_reg;
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

  polar_tree_encoder #(.N(N)) u_tree (
    .u (u_reg),
    .k (k),
    .x (x_bit)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_reg <= '0;
      busy  <= 1'b0;
    end else if (accept) begin
      u_reg <= u_in;
      busy  <= 1'b1;
    end else if (busy && k_last) begin
      busy  <= 1'b0;
    end
  end

  assign x_valid = busy;
  assign x_index = k;
  assign x_last  = busy && k_last;

endmodule
