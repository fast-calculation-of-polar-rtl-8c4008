// tb_split_channel_serial: full-size (N = 1024) serial split-channel
// calculator. For several (alpha, pte) pairs it checks every p_e against the
// fixed-point model, the index and memory-write stream, the data/frozen
// decision, that channel 0 appears one cycle after start, that the run takes
// exactly N cycles with done on the last, and that a start while busy is
// ignored (inputs are captured at start).
module tb_split_channel_serial;
  import polar_ref_pkg::*;
  localparam int N = 1024, FRAC = 16;
  localparam longint ONE = longint'(1) << FRAC;

  logic clk = 0, rst_n = 0, start = 0;
  logic [FRAC:0] alpha, pte, pe;
  logic busy, pe_valid, is_data, wr_en, wr_data, done;
  logic [9:0] pe_index, wr_addr;
  int checks = 0, failures = 0;
  int cycle = 0;

  split_channel_serial dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint a, p, pf;
    int t0, n, ndata;
    alpha = '0; pte = '0;
    repeat (3) @(posedge clk);
    #1 chk(!busy && !wr_en && !done, "idle after reset");
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      a = (r == 0) ? ONE / 2 : longint'($urandom_range(0, 65536));
      p = (r == 0) ? longint'(polar_pkg::PTE_DEFAULT_Q16) : longint'($urandom_range(0, 65536));
      @(negedge clk);
      alpha = 17'(a); pte = 17'(p); start = 1;
      t0 = cycle;
      @(negedge clk);
      start = 0; alpha = ~alpha; pte = ~pte;
      n = 0; ndata = 0;
      while (pe_valid) begin
        pf = ref_pe_fix(a, n, 10, FRAC);
        chk(cycle - t0 == n + 1, "one channel per cycle");
        chk(pe_index == 10'(n) && wr_addr == 10'(n) && wr_en, "index / write address");
        chk(longint'(pe) == pf, $sformatf("r=%0d k=%0d pe=%0d model=%0d", r, n, pe, pf));
        chk(is_data == (pf < p) && wr_data == is_data, "decision");
        chk(done == (n == N - 1), "done");
        if (is_data) ndata++;
        if (n == 17) start = 1;
        if (n == 18) start = 0;
        n++;
        @(negedge clk);
      end
      chk(n == N, $sformatf("run length %0d", n));
      chk(!busy && !wr_en, "idle after run");
      if (r == 0) $display("alpha=0.5 pte=0.4: %0d data bits of %0d", ndata, N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
