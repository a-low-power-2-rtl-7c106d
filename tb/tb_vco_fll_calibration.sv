`timescale 1ns/1ps
// tb_vco_fll_calibration: a VCO model (test only) gives, at the fixed
// control voltage, f(band) = 2256 MHz + band * 25.5 MHz, a spread like the
// measured 2.256-3.047 GHz range over 32 sub-ranges; the counter sees f/8.
// With a 2 MHz reference and a 16-cycle window the count equals f in MHz.
// For several ratios the calibration must choose the highest band whose
// frequency is at most 8*n_div*2 MHz (computed here), keep the loop open
// only while calibrating, and take the expected number of reference cycles.
module tb_vco_fll_calibration;
  logic clk_ref = 1'b0, clk_cnt = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [11:0] n_div = 12'd171;
  logic [4:0] band;
  logic pll_open, done;
  logic [16:0] count;
  int checks = 0, failures = 0;

  vco_fll_calibration #(.BANDW(5), .NW(12), .WIN(16), .SETTLE(8), .SYNC_WAIT(4)) dut (.*);

  always #250 clk_ref = ~clk_ref;
  // VCO / 8, band dependent; frequency in MHz
  real f_mhz;
  assign f_mhz = 2256.0 + 25.5 * real'(band);
  always begin
    #(4000.0 / f_mhz) clk_cnt = ~clk_cnt;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    int ratios [4] = '{171, 150, 180, 200};
    repeat (2) @(negedge clk_ref);
    rst_n = 1'b1;
    foreach (ratios[i]) begin
      int exp_band, cyc;
      real target;
      n_div = 12'(ratios[i]);
      target = 16.0 * ratios[i];      // MHz
      exp_band = 0;
      for (int b = 0; b < 32; b++) if (2256.0 + 25.5 * b <= target) exp_band = b;
      @(negedge clk_ref) start = 1'b1;
      @(negedge clk_ref) start = 1'b0;
      cyc = 1;
      while (!done && cyc < 1000) begin
        chk(pll_open, "loop open during calibration");
        @(negedge clk_ref);
        cyc++;
      end
      chk(done && !pll_open, "done, loop closed");
      chk(band == 5'(exp_band), $sformatf("n=%0d band %0d expected %0d", ratios[i], band, exp_band));
      chk(cyc >= 5 * 35 && cyc <= 5 * 35 + 2, $sformatf("reference cycles %0d", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
