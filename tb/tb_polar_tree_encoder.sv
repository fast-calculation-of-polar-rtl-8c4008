// tb_polar_tree_encoder: checks the tree encoding structure against the
// butterfly encoder x = u * B_N * F^{(x)n}, for N = 8, 16 and 1024, and
// the two worked examples: x_6 = u_3 + u_7 (N = 8) and x_13 = u_11 + u_15
// (N = 16).
module tb_polar_tree_encoder;
  import polar_ref_pkg::*;

  logic [7:0]    u8;   logic [2:0] k8;  logic x8;
  logic [15:0]   u16;  logic [3:0] k16; logic x16;
  logic [1023:0] u1k;  logic [9:0] k1k; logic x1k;
  int checks = 0, failures = 0;

  polar_tree_encoder #(.N(8))  dut8   (.u(u8),  .k(k8),  .x(x8));
  polar_tree_encoder #(.N(16)) dut16  (.u(u16), .k(k16), .x(x16));
  polar_tree_encoder           dut1k  (.u(u1k), .k(k1k), .x(x1k));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MAXN-1:0] ref_x, uu;
    // Worked examples: which u bits reach the top for x_6 / x_13.
    k8 = 3'd6; k16 = 4'd13;
    for (int i = 0; i < 16; i++) begin
      u8 = 8'(1 << i); u16 = 16'(1 << i);
      #1;
      if (i < 8) chk(x8 == (i == 3 || i == 7), $sformatf("x6 one-hot u%0d", i));
      chk(x16 == (i == 11 || i == 15), $sformatf("x13 one-hot u%0d", i));
    end
    // Exhaustive N = 8, random N = 16.
    for (int w = 0; w < 256; w++) begin
      u8 = 8'(w); uu = '0; uu[7:0] = u8;
      ref_x = ref_encode(uu, 3);
      for (int k = 0; k < 8; k++) begin
        k8 = 3'(k); #1;
        chk(x8 == ref_x[k], $sformatf("N8 u=%0h k=%0d", w, k));
      end
    end
    for (int w = 0; w < 50; w++) begin
      u16 = 16'($urandom); uu = '0; uu[15:0] = u16;
      ref_x = ref_encode(uu, 4);
      for (int k = 0; k < 16; k++) begin
        k16 = 4'(k); #1;
        chk(x16 == ref_x[k], $sformatf("N16 k=%0d", k));
      end
    end
    // Full size, N = 1024: sparse and dense words, every k.
    for (int w = 0; w < 6; w++) begin
      for (int i = 0; i < 1024; i++) uu[i] = (w < 3) ? ($urandom_range(0, 99) < 3) : 1'($urandom);
      u1k = uu;
      ref_x = ref_encode(uu, 10);
      for (int k = 0; k < 1024; k++) begin
        k1k = 10'(k); #1;
        chk(x1k == ref_x[k], $sformatf("N1024 w=%0d k=%0d", w, k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
