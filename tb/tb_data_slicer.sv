`timescale 1ns/1ps
// tb_data_slicer: random filter values and thresholds; the decision must be
// 1 exactly when the value is below the threshold and a threshold exists,
// one clock after the inputs, and hold while the enable is low.
module tb_data_slicer;
  localparam int DW = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, thr_valid = 1'b0;
  logic [DW-1:0] din = '0, threshold = '0;
  logic raw;
  int checks = 0, failures = 0;

  data_slicer #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    logic exp_raw;
    exp_raw = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      en        = ($urandom_range(0, 4) != 0);
      thr_valid = ($urandom_range(0, 9) != 0);
      din       = DW'($urandom);
      threshold = (i % 7 == 0) ? din : DW'($urandom);
      if (en) exp_raw = thr_valid && (din < threshold);
      @(negedge clk);
      checks++;
      if (raw !== exp_raw) begin
        failures++;
        $display("FAIL i=%0d din=%0d thr=%0d raw=%b", i, din, threshold, raw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
