// frozen_loc_mem: memory of the frozen and data bit locations of a code
// word, filled by the split-channel calculators and read while encoding.
//
// One bit per bit location: 1 = data (information) bit, 0 = frozen bit.
// Two write ports: a single-bit port (wr_en/wr_addr/wr_data) used by the
// serial calculator, one location per cycle, and a whole-word port
// (wr_all_en/wr_all_data) used by the parallel calculator, all locations in
// one cycle. When both write in the same cycle the single-bit write wins
// for its location. Writes take effect on the rising clock edge.
//
// Read side: mask is the whole content; rd_data is location rd_addr, both
// combinational. The content is reset to all-frozen (all zero) by the
// asynchronous active-low rst_n. Port layout, priority and reset value are
// this design's choices.
module frozen_loc_mem #(
  parameter int unsigned N  = 1024,
  localparam int unsigned NB = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [NB-1:0] wr_addr,
  input  logic          wr_data,
  input  logic          wr_all_en,
  input  logic [N-1:0]  wr_all_data,
  input  logic [NB-1:0] rd_addr,
  output logic          rd_data,
  output logic [N-1:0]  mask
);

  logic [N-1:0] loc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loc <= '0;
    end else begin
      if (wr_all_en) loc <= wr_all_data;
      if (wr_en)     loc[wr_addr] <= wr_data;
    end
  end

  assign mask    = loc;
  assign rd_data = loc[rd_addr];

endmodule
