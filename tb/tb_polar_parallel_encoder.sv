// tb_polar_parallel_encoder: full-size (N = 1024) parallel encoder. Back-to-
// back and spaced information words; each code word must appear one cycle
// after its in_valid and match the butterfly reference in all N bits.
module tb_polar_parallel_encoder;
  import polar_ref_pkg::*;
  localparam int N = 1024;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [N-1:0] u_in, x_out;
  logic out_valid;
  int checks = 0, failures = 0;

  polar_parallel_encoder dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MAXN-1:0] uu, ref_x, expect_q[$];
    u_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 60; c++) begin
      @(negedge clk);
      // Compare what the previous edge registered.
      if (out_valid) begin
        ref_x = expect_q.pop_front();
        for (int j = 0; j < N; j++) chk(x_out[j] == ref_x[j], $sformatf("c=%0d x%0d", c, j));
      end else chk(expect_q.size() == 0, "out_valid missing");
      in_valid = (c < 55) && ($urandom_range(0, 2) != 0);
      for (int i = 0; i < N; i++) uu[i] = (c % 3 == 0) ? ($urandom_range(0, 99) < 2) : 1'($urandom);
      u_in = uu;
      if (in_valid) expect_q.push_back(ref_encode(uu, 10));
    end
    chk(expect_q.size() == 0, "all words delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
