// tb_polar_serial_encoder: full-size (N = 1024) serial encoder. For several
// information words it checks every code bit against the butterfly
// reference, the code-bit index, x_last, that x_0 appears one cycle after
// start and that the frame takes exactly N cycles, and that a start while
// busy is ignored.
module tb_polar_serial_encoder;
  import polar_ref_pkg::*;
  localparam int N = 1024;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] u_in;
  logic busy, x_valid, x_bit, x_last;
  logic [9:0] x_index;
  int checks = 0, failures = 0;
  int cycle = 0;

  polar_serial_encoder dut (.*);

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
    logic [MAXN-1:0] ref_x, uu;
    int t0, nbits;
    u_in = '0;
    repeat (3) @(posedge clk);
    #1 chk(!busy && !x_valid, "idle after reset");
    rst_n = 1;
    for (int w = 0; w < 5; w++) begin
      for (int i = 0; i < N; i++) uu[i] = (w == 0) ? (i == 5) : 1'($urandom);
      ref_x = ref_encode(uu, 10);
      @(negedge clk);
      u_in = uu; start = 1;
      t0 = cycle;
      @(negedge clk);
      start = 0;
      u_in = ~uu;  // must not matter any more
      nbits = 0;
      while (x_valid) begin
        chk(cycle - t0 == nbits + 1, "one bit per cycle, x0 one cycle after start");
        chk(x_index == 10'(nbits), "index");
        chk(x_bit == ref_x[nbits], $sformatf("w=%0d x%0d", w, nbits));
        chk(x_last == (nbits == N - 1), "last");
        if (nbits == 100) start = 1;      // start while busy: ignored
        if (nbits == 101) start = 0;
        nbits++;
        @(negedge clk);
      end
      chk(nbits == N, $sformatf("frame length %0d", nbits));
      chk(!busy, "idle after frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
