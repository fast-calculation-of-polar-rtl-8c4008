// tb_frozen_loc_mem: full-size (N = 1024) location memory. Random single-bit
// writes, whole-word writes and both at once, checked against a model
// through the whole-mask output and the single-location read port.
module tb_frozen_loc_mem;
  localparam int N = 1024;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_data = 0, wr_all_en = 0, rd_data;
  logic [9:0] wr_addr = '0, rd_addr = '0;
  logic [N-1:0] wr_all_data = '0, mask, model;
  int checks = 0, failures = 0;

  frozen_loc_mem dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1 chk(mask == '0, "reset to all frozen");
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      chk(mask == model, $sformatf("mask c=%0d", c));
      for (int r = 0; r < 4; r++) begin
        rd_addr = 10'($urandom); #1;
        chk(rd_data == model[rd_addr], "read port");
      end
      wr_en = ($urandom_range(0, 1) == 1);
      wr_addr = 10'($urandom);
      wr_data = 1'($urandom);
      wr_all_en = ($urandom_range(0, 29) == 0);
      for (int i = 0; i < N; i += 32) wr_all_data[i +: 32] = $urandom;
      @(posedge clk);
      if (wr_all_en) model = wr_all_data;
      if (wr_en) model[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
