// tb_polar_counter: checks clear, increment, hold, the 'last' flag and the
// wrap from N-1 to 0 of the n-bit level-label counter (N = 16).
module tb_polar_counter;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [3:0] count;
  logic last;
  int checks = 0, failures = 0;
  int model = 0;

  polar_counter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s count=%0d model=%0d", what, count, model); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 chk(count == 0, "reset");
    rst_n = 1;
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      clear = ($urandom_range(0, 19) == 0);
      en    = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (clear) model = 0;
      else if (en) model = (model + 1) % N;
      #1;
      chk(count == model, "count");
      chk(last == (model == N - 1), "last");
    end
    // Full wrap with enable held.
    @(negedge clk); clear = 1; en = 0;
    @(negedge clk); clear = 0; en = 1;
    for (int c = 0; c < N; c++) begin
      chk(count == c, "sweep");
      chk(last == (c == N - 1), "sweep last");
      @(negedge clk);
    end
    chk(count == 0, "wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
