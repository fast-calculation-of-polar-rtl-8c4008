// polar_top: polar code bit generation and frozen-bit location calculation
// without a generator matrix.
//
// Two independent parts share the clock and reset:
//
//  * Encoder. The information word u_in is encoded by tree encoding
//    structures labelled by an n-bit counter. polar_serial_encoder emits one
//    code bit per cycle through a single tree (enc_start); polar_parallel_-
//    encoder computes the whole code word at once through N trees
//    (enc_par_valid). Both give x = u * B_N * F^{(x)n}.
//
//  * Frozen-bit locator. From the channel parameter alpha (Bhattacharyya
//    parameter or average bit-error probability of the physical channel) the
//    error probability of every split channel u_k is computed by a tree of
//    f(x) = 2x - x^2 / g(x) = x^2 nodes, and u_k is marked as a data bit if
//    it is below the threshold pte. calc_mode selects the serial calculator
//    (one channel per cycle, N cycles) or the parallel one (all channels in
//    one cycle). Either writes its decisions into frozen_loc_mem, whose
//    content (frozen_mask, 1 = data, 0 = frozen) and single-location read
//    port are brought out for the transmitter.
//
// Timing: enc_start / calc_start are accepted when the serial unit concerned
// is idle. Serial encoder: x_0 one cycle after enc_start, then one bit per
// cycle. Parallel encoder: code word one cycle after enc_par_valid. Serial
// locator: N cycles (calc_busy), memory updated one bit per cycle, calc_done
// with the last. Parallel locator: calc_done one cycle after calc_start.
// In both modes the memory holds every decision from the cycle after
// calc_done on. A parallel start is also held off
// while a serial calculation runs, so the two never write the memory
// together. The modes, handshakes and number format are this design's
// choices; the tree structures and the algorithms are those of the method.
module polar_top
  import polar_pkg::*;
#(
  parameter int unsigned N    = N_DEFAULT,
  parameter int unsigned FRAC = FRAC_DEFAULT,
  localparam int unsigned NB  = $clog2(N),
  localparam int unsigned W   = FRAC + 1
) (
  input  logic          clk,
  input  logic          rst_n,

  // Encoder
  input  logic [N-1:0]  u_in,
  input  logic          enc_start,
  output logic          enc_busy,
  output logic          enc_x_valid,
  output logic          enc_x_bit,
  output logic [NB-1:0] enc_x_index,
  output logic          enc_x_last,
  input  logic          enc_par_valid,
  output logic          enc_par_out_valid,
  output logic [N-1:0]  enc_par_x,

  // Frozen-bit locator
  input  calc_mode_e    calc_mode,
  input  logic          calc_start,
  input  logic [W-1:0]  alpha,
  input  logic [W-1:0]  pte,
  output logic          calc_busy,
  output logic          calc_done,
  output logic          pe_valid,
  output logic [W-1:0]  pe,
  output logic [NB-1:0] pe_index,
  output logic          pe_is_data,
  output logic [N-1:0][W-1:0] par_pe,
  input  logic [NB-1:0] loc_rd_addr,
  output logic          loc_rd_data,
  output logic [N-1:0]  frozen_mask
);

  // ---------------------------------------------------------------- encoder
  polar_serial_encoder #(.N(N)) u_ser_enc (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (enc_start),
    .u_in    (u_in),
    .busy    (enc_busy),
    .x_valid (enc_x_valid),
    .x_bit   (enc_x_bit),
    .x_index (enc_x_index),
    .x_last  (enc_x_last)
  );

  polar_parallel_encoder #(.N(N)) u_par_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (enc_par_valid),
    .u_in      (u_in),
    .out_valid (enc_par_out_valid),
    .x_out     (enc_par_x)
  );

  // ----------------------------------------------------- frozen-bit locator
  logic          ser_start, par_start;
  logic          ser_busy, ser_done;
  logic          ser_wr_en, ser_wr_data;
  logic [NB-1:0] ser_wr_addr;
  logic          par_valid;
  logic [N-1:0]  par_mask;

  assign ser_start = calc_start && (calc_mode == CALC_SERIAL);
  assign par_start = calc_start && (calc_mode == CALC_PARALLEL) && !ser_busy;

  split_channel_serial #(.N(N), .FRAC(FRAC)) u_ser_calc (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (ser_start),
    .alpha    (alpha),
    .pte      (pte),
    .busy     (ser_busy),
    .pe_valid (pe_valid),
    .pe       (pe),
    .pe_index (pe_index),
    .is_data  (pe_is_data),
    .wr_en    (ser_wr_en),
    .wr_addr  (ser_wr_addr),
    .wr_data  (ser_wr_data),
    .done     (ser_done)
  );

  split_channel_parallel #(.N(N), .FRAC(FRAC)) u_par_calc (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (par_start),
    .alpha     (alpha),
    .pte       (pte),
    .valid     (par_valid),
    .pe        (par_pe),
    .data_mask (par_mask)
  );

  frozen_loc_mem #(.N(N)) u_loc_mem (
    .clk         (clk),
    .rst_n       (rst_n),
    .wr_en       (ser_wr_en),
    .wr_addr     (ser_wr_addr),
    .wr_data     (ser_wr_data),
    .wr_all_en   (par_valid),
    .wr_all_data (par_mask),
    .rd_addr     (loc_rd_addr),
    .rd_data     (loc_rd_data),
    .mask        (frozen_mask)
  );

  assign calc_busy = ser_busy;
  assign calc_done = ser_done || par_valid;

endmodule
