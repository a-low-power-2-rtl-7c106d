`timescale 1ns/1ps
// tb_lo_div8_quad: checks that the divide-by-eight gives two 50% clocks at
// one eighth of the input frequency, with Q lagging I by two input cycles
// (90 degrees).
module tb_lo_div8_quad;
  logic clk = 1'b0, rst_n = 1'b0;
  logic lo_i, lo_q;
  int checks = 0, failures = 0;

  lo_div8_quad dut (.clk(clk), .rst_n(rst_n), .lo_i(lo_i), .lo_q(lo_q));

  always #1 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference: Johnson counter state after n clocks from reset is the
  // position in an 8-step square wave; I is high for steps 1..4, Q for 3..6
  initial begin
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (n = 1; n <= 64; n++) begin
      @(negedge clk);
      check(lo_i == ((n % 8) >= 1 && (n % 8) <= 4), $sformatf("lo_i at %0d", n));
      check(lo_q == ((n % 8) >= 3 && (n % 8) <= 6), $sformatf("lo_q at %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
