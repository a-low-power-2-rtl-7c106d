`timescale 1ns/1ps
// tb_pll_divider_n: for several ratios (including the smallest, 2, and odd
// ones) the output period must be n_div input cycles and the high time
// floor(n_div/2) cycles; a ratio change takes effect after the current period.
module tb_pll_divider_n;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [11:0] n_div = 12'd5;
  logic fb;
  int checks = 0, failures = 0;

  pll_divider_n #(.NW(12)) dut (.*);

  always #1 clk = ~clk;

  int cyc = 0, last_rise = -1, last_fall = -1, period = 0, high = 0;
  logic fb_d = 1'b0;
  always @(posedge clk) begin
    cyc++;
    fb_d <= fb;
  end
  always @(negedge clk) begin
    if (fb && !fb_d) begin
      if (last_rise >= 0) period = cyc - last_rise;
      last_rise = cyc;
    end
    if (!fb && fb_d) begin
      high = cyc - last_rise;
    end
  end

  initial begin
    int ratios [6] = '{5, 2, 3, 171, 8, 4095};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (ratios[i]) begin
      n_div = 12'(ratios[i]);
      repeat ((i > 0 ? ratios[i-1] : 0) + 3 * ratios[i] + 10) @(negedge clk);
      checks += 2;
      if (period != ratios[i]) begin failures++; $display("FAIL n=%0d period %0d", ratios[i], period); end
      if (high != ratios[i] / 2) begin failures++; $display("FAIL n=%0d high %0d", ratios[i], high); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
