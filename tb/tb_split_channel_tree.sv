// tb_split_channel_tree: error-probability tree.
//  * Worked example, N = 16, u_13, BEC with alpha = 0.5: the top value must
//    be 0.015 (to the three printed decimals).
//  * Full size, N = 1024: for several alpha, every k is compared bit-exactly
//    with the fixed-point model and, within the worst-case truncation error
//    of 2^n LSBs, with the floating-point Bhattacharyya recursion; is_data
//    must equal p_e < pte.
module tb_split_channel_tree;
  import polar_ref_pkg::*;
  localparam int FRAC = 16;
  localparam longint ONE = longint'(1) << FRAC;

  logic [FRAC:0] a16, t16, pe16, a1k, t1k, pe1k;
  logic [3:0] k16; logic [9:0] k1k;
  logic d16, d1k;
  int checks = 0, failures = 0;

  split_channel_tree #(.N(16)) dut16 (.alpha(a16), .pte(t16), .k(k16), .pe(pe16), .is_data(d16));
  split_channel_tree           dut1k (.alpha(a1k), .pte(t1k), .k(k1k), .pe(pe1k), .is_data(d1k));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real z[];
    real pr, tol;
    longint alphas[6];
    longint pf;
    a16 = 17'(ONE / 2); t16 = 17'(polar_pkg::PTE_DEFAULT_Q16); k16 = 4'd13;
    #1;
    pr = real'(pe16) / real'(ONE);
    chk(pr > 0.0145 && pr < 0.0155, $sformatf("u13 example pe=%f", pr));
    chk(d16 == 1'b1, "u13 is a data bit for pte = 0.4");
    k16 = 4'd0; #1;   // u_0 is the worst channel: 1 - 0.5^16, frozen
    chk(d16 == 1'b0, "u0 frozen");

    alphas = '{ONE / 2, ONE, 0, ONE / 10, (ONE * 3) / 4, longint'($urandom_range(1, 65535))};
    tol = real'(1 << 10) / real'(ONE);
    foreach (alphas[ai]) begin
      a1k = 17'(alphas[ai]);
      t1k = 17'($urandom_range(0, 65536));
      ref_pe_real(real'(alphas[ai]) / real'(ONE), 10, z);
      for (int k = 0; k < 1024; k++) begin
        k1k = 10'(k); #1;
        pf = ref_pe_fix(alphas[ai], k, 10, FRAC);
        chk(longint'(pe1k) == pf, $sformatf("a=%0d k=%0d pe=%0d model=%0d", alphas[ai], k, pe1k, pf));
        pr = real'(pe1k) / real'(ONE);
        chk(pr - z[k] <= tol && z[k] - pr <= tol, $sformatf("k=%0d real %f vs %f", k, pr, z[k]));
        chk(d1k == (pf < longint'(t1k)), "is_data");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
