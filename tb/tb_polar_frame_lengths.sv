// tb_polar_frame_lengths: runs the encoders at every frame length of the
// hardware comparison, N = 8, 16, ..., 512 (N = 1024 is covered by
// tb_polar_top). For each N a serial and a parallel encoder are built; each
// encodes random information words, which must match the butterfly
// reference, and the serial frame must take exactly N cycles.
module tb_polar_frame_lengths;
  import polar_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int sizes_done = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  for (genvar s = 3; s <= 9; s++) begin : g_size
    localparam int N = 1 << s;
    logic start = 0, in_valid = 0;
    logic [N-1:0] u_in = '0, x_par;
    logic busy, x_valid, x_bit, x_last, out_valid;
    logic [s-1:0] x_index;

    polar_serial_encoder #(.N(N)) u_ser (
      .clk, .rst_n, .start, .u_in, .busy, .x_valid, .x_bit, .x_index, .x_last
    );
    polar_parallel_encoder #(.N(N)) u_par (
      .clk, .rst_n, .in_valid, .u_in, .out_valid, .x_out(x_par)
    );

    initial begin
      logic [MAXN-1:0] uu, ref_x;
      int n;
      @(posedge rst_n);
      for (int w = 0; w < 4; w++) begin
        uu = '0;
        for (int i = 0; i < N; i++) uu[i] = 1'($urandom);
        ref_x = ref_encode(uu, s);
        @(negedge clk);
        u_in = uu[N-1:0]; start = 1; in_valid = 1;
        @(negedge clk);
        start = 0; in_valid = 0;
        checks++;
        if (!(out_valid && x_par == ref_x[N-1:0])) begin
          failures++; $display("FAIL N=%0d parallel word %0d", N, w);
        end
        n = 0;
        while (x_valid) begin
          checks++;
          if (x_bit != ref_x[n] || x_index != s'(n)) begin
            failures++; $display("FAIL N=%0d serial x%0d", N, n);
          end
          n++;
          @(negedge clk);
        end
        checks++;
        if (n != N) begin failures++; $display("FAIL N=%0d frame length %0d", N, n); end
      end
      sizes_done++;
    end
  end

  initial begin
    wait (sizes_done == 7);
    $display("frame lengths 8..512 encoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
