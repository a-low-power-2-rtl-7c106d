`timescale 1ns/1ps
// tb_tdc_calibration: the testbench models the TDC seen through the
// reference: code = floor((166.67 - 141*f) / (1.15*f)) with f = PROC *
// (96 - trim)/64, delivered every other clock. For three process corners the
// calibration must end with the largest trim whose code is at most 22 (found
// by brute force), hold the multiplexer on the reference only while busy,
// and take the expected number of cycles.
module tb_tdc_calibration;
  localparam int SETTLE = 16;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [5:0] s_period;
  logic s_valid = 1'b0;
  logic sel_ref, busy, done;
  logic [5:0] itrim;
  int checks = 0, failures = 0;
  real proc = 1.0;

  tdc_calibration #(.ITRIM_W(6), .SW(6), .S_TARGET(22), .SETTLE(SETTLE)) dut (.*);

  always #41.667 clk = ~clk;

  function automatic int code_of(input int trim, input real p);
    real f, v;
    f = p * real'(96 - trim) / 64.0;
    v = (166.667 - 141.0 * f) / (1.15 * f);
    if (v < 0.0) return 0;
    if (v > 63.0) return 63;
    return int'($floor(v));
  endfunction

  assign s_period = 6'(code_of(int'(itrim), proc));
  always @(posedge clk) s_valid <= ~s_valid;

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    real corners [3] = '{1.0, 1.12, 0.9};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk(itrim == 6'd32 && !sel_ref && !done, "reset state");
    foreach (corners[i]) begin
      int best, cyc;
      proc = corners[i];
      best = 0;
      for (int t = 0; t < 64; t++) if (code_of(t, proc) <= 22) best = t;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      cyc = 1;
      while (!done && cyc < 1000) begin
        chk(sel_ref == busy && busy, "mux on reference while busy");
        @(negedge clk);
        cyc++;
      end
      chk(done && !sel_ref, "finished, mux back on IF2");
      chk(itrim == 6'(best), $sformatf("corner %f trim %0d expected %0d", proc, itrim, best));
      // 6 bits, each SETTLE+1 settling cycles and up to 2 waiting for a code
      chk(cyc >= 6 * (SETTLE + 2) && cyc <= 6 * (SETTLE + 3) + 1, $sformatf("cycles %0d", cyc));
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
