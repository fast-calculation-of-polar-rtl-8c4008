// tb_split_channel_parallel: full-size (N = 1024) parallel split-channel
// calculator. For several (alpha, pte) pairs all N probabilities and the
// data mask must appear one cycle after start and match the fixed-point
// model; results hold while start is low.
module tb_split_channel_parallel;
  import polar_ref_pkg::*;
  localparam int N = 1024, FRAC = 16;
  localparam longint ONE = longint'(1) << FRAC;

  logic clk = 0, rst_n = 0, start = 0;
  logic [FRAC:0] alpha, pte;
  logic [N-1:0][FRAC:0] pe;
  logic [N-1:0] data_mask;
  logic valid;
  int checks = 0, failures = 0;

  split_channel_parallel dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint a, p, pf;
    alpha = '0; pte = '0;
    repeat (2) @(posedge clk);
    #1 chk(!valid && data_mask == '0, "reset");
    rst_n = 1;
    for (int r = 0; r < 5; r++) begin
      a = (r == 0) ? ONE / 2 : longint'($urandom_range(0, 65536));
      p = (r == 0) ? longint'(polar_pkg::PTE_DEFAULT_Q16) : longint'($urandom_range(0, 65536));
      @(negedge clk);
      alpha = 17'(a); pte = 17'(p); start = 1;
      @(negedge clk);
      start = 0; alpha = '0; pte = '0;
      chk(valid, "valid one cycle after start");
      for (int j = 0; j < N; j++) begin
        pf = ref_pe_fix(a, j, 10, FRAC);
        chk(longint'(pe[j]) == pf, $sformatf("r=%0d u%0d pe=%0d model=%0d", r, j, pe[j], pf));
        chk(data_mask[j] == (pf < p), $sformatf("mask u%0d", j));
      end
      @(negedge clk);
      chk(!valid, "valid is a pulse");
      pf = ref_pe_fix(a, 13, 10, FRAC);
      chk(longint'(pe[13]) == pf, "results hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
