// tb_polar_top: end-to-end run of the whole design at its default size
// (N = 1024, 16 fractional bits).
//
// For several channel parameters it
//  1. fills the location memory with the serial locator (N cycles) and
//     checks the memory against the fixed-point model, through the mask and
//     the read port;
//  2. recomputes it with the parallel locator (one cycle) and checks the
//     same mask and all N probabilities;
//  3. builds an information word with random data on the data locations
//     and zeros on the frozen ones, encodes it with the serial and the
//     parallel encoder, and checks both code words against the butterfly
//     reference.
// It also requests a parallel calculation while the serial one runs (must
// be held off) and an encoder start while busy (must be ignored). Each of
// these mechanisms is counted; one that never happened counts a failure.
module tb_polar_top;
  import polar_pkg::*;
  import polar_ref_pkg::*;
  localparam int N = 1024, FRAC = 16;
  localparam longint ONE = longint'(1) << FRAC;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] u_in = '0;
  logic enc_start = 0, enc_par_valid = 0;
  logic enc_busy, enc_x_valid, enc_x_bit, enc_x_last, enc_par_out_valid;
  logic [9:0] enc_x_index;
  logic [N-1:0] enc_par_x;
  calc_mode_e calc_mode = CALC_SERIAL;
  logic calc_start = 0;
  logic [FRAC:0] alpha = '0, pte = '0, pe;
  logic calc_busy, calc_done, pe_valid, pe_is_data;
  logic [9:0] pe_index, loc_rd_addr = '0;
  logic [N-1:0][FRAC:0] par_pe;
  logic loc_rd_data;
  logic [N-1:0] frozen_mask;

  polar_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_ser_calc = 0, n_par_calc = 0, n_ser_enc = 0, n_par_enc = 0;
  int n_held_off = 0, n_ignored = 0, n_mode_switch = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MAXN-1:0] model_mask, uu, ref_x, ser_x;
    longint a, p;
    int t0, n, ndata;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      a = (r == 0) ? ONE / 2 : longint'($urandom_range(3000, 62000));
      p = (r == 0) ? longint'(PTE_DEFAULT_Q16) : longint'($urandom_range(1000, 60000));
      model_mask = '0;
      for (int k = 0; k < N; k++) model_mask[k] = (ref_pe_fix(a, k, 10, FRAC) < p);

      // 1. serial locator, with a parallel request in the middle.
      @(negedge clk);
      if (calc_mode != CALC_SERIAL) n_mode_switch++;
      calc_mode = CALC_SERIAL; alpha = 17'(a); pte = 17'(p); calc_start = 1;
      t0 = cycle;
      @(negedge clk);
      calc_start = 0;
      n = 0;
      while (calc_busy) begin
        chk(pe_valid && pe_index == 10'(n), "serial index");
        chk(longint'(pe) == ref_pe_fix(a, n, 10, FRAC), $sformatf("serial pe u%0d", n));
        chk(pe_is_data == model_mask[n], "serial decision");
        if (n == 300) begin
          calc_mode = CALC_PARALLEL; calc_start = 1;
        end else if (n == 301) begin
          calc_start = 0; calc_mode = CALC_SERIAL;
          chk(!calc_done, "parallel start held off");
          n_held_off++;
        end
        n++;
        @(negedge clk);
      end
      chk(n == N && cycle - t0 == N + 1, $sformatf("serial locator took %0d cycles", n));
      chk(frozen_mask == model_mask[N-1:0], "memory after serial locator");
      for (int i = 0; i < 64; i++) begin
        loc_rd_addr = 10'($urandom); #1;
        chk(loc_rd_data == model_mask[loc_rd_addr], "memory read port");
      end
      n_ser_calc++;

      // 2. parallel locator: first clear the memory through a locator run
      //    whose threshold marks everything frozen, then the real one.
      @(negedge clk);
      calc_mode = CALC_PARALLEL; n_mode_switch++;
      pte = '0; calc_start = 1;
      @(negedge clk);
      calc_start = 0;
      chk(calc_done, "parallel done one cycle after start");
      @(negedge clk);
      chk(frozen_mask == '0, "all frozen for pte = 0");
      pte = 17'(p); calc_start = 1;
      @(negedge clk);
      calc_start = 0;
      chk(calc_done, "parallel done");
      for (int k = 0; k < N; k++)
        chk(longint'(par_pe[k]) == ref_pe_fix(a, k, 10, FRAC), $sformatf("parallel pe u%0d", k));
      @(negedge clk);
      chk(frozen_mask == model_mask[N-1:0], "memory after parallel locator");
      n_par_calc++;

      // 3. encode a frame with data on the data locations.
      uu = '0; ndata = 0;
      for (int k = 0; k < N; k++) if (frozen_mask[k]) begin uu[k] = 1'($urandom); ndata++; end
      ref_x = ref_encode(uu, 10);
      u_in = uu; enc_start = 1; enc_par_valid = 1;
      @(negedge clk);
      enc_start = 0; enc_par_valid = 0; u_in = '0;
      chk(enc_par_out_valid && enc_par_x == ref_x[N-1:0], "parallel code word");
      n_par_enc++;
      n = 0; ser_x = '0;
      while (enc_x_valid) begin
        chk(enc_x_index == 10'(n) && enc_x_last == (n == N - 1), "serial code index");
        ser_x[n] = enc_x_bit;
        if (n == 10) begin enc_start = 1; u_in = ~uu; end
        if (n == 11) begin
          enc_start = 0;
          if (enc_busy) n_ignored++;
        end
        n++;
        @(negedge clk);
      end
      chk(n == N, "serial encoder frame length");
      chk(ser_x[N-1:0] == ref_x[N-1:0], "serial code word");
      n_ser_enc++;
      $display("alpha=%0d/65536 pte=%0d/65536: %0d data bits", a, p, ndata);
    end

    chk(n_ser_calc > 0, "serial locator exercised");
    chk(n_par_calc > 0, "parallel locator exercised");
    chk(n_ser_enc > 0, "serial encoder exercised");
    chk(n_par_enc > 0, "parallel encoder exercised");
    chk(n_held_off > 0, "parallel request held off");
    chk(n_ignored > 0, "busy start ignored");
    chk(n_mode_switch > 0, "mode switch");
    $display("mechanisms: ser_calc=%0d par_calc=%0d ser_enc=%0d par_enc=%0d held_off=%0d ignored=%0d mode_switch=%0d",
             n_ser_calc, n_par_calc, n_ser_enc, n_par_enc, n_held_off, n_ignored, n_mode_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
