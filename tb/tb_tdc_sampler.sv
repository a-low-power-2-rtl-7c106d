`timescale 1ns/1ps
// tb_tdc_sampler: an ideal delay line in the testbench delays a square wave
// of period T by 141 + 1.15*k ns onto tap k. For a sweep of periods the TDC
// code must equal the number of taps whose delay is below T, less one
// (floor((T-141)/1.15), 0 below 141 ns), the thermometer code must have that many zeros at the bottom
// followed by a 1, and one new code must appear per period (10 to 13 in a
// burst of 12, as up to two periods are still in the line).
module tb_tdc_sampler;
  localparam int N = 64, SW = 6;
  logic rst_n = 1'b0, sig = 1'b0;
  logic [N-1:0] c = '0;
  logic [N-1:0] q;
  logic [SW-1:0] s_period;
  logic s_toggle;
  int checks = 0, failures = 0;

  tdc_sampler #(.N_TAPS(N), .SW(SW)) dut (.*);

  for (genvar k = 0; k < N; k++) begin : g_tap
    always @(sig) fork
      automatic logic v = sig;
      begin #(141.0 + 1.15 * k) c[k] = v; end
    join_none
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  int n_codes;
  always @(s_toggle) n_codes++;

  initial begin
    real periods [9] = '{130.0, 141.6, 150.0, 166.667, 171.3, 190.0, 205.5, 213.9, 230.0};
    #10 rst_n = 1'b1;
    foreach (periods[i]) begin
      real tp;
      int expz;
      tp = periods[i];
      expz = 0;
      for (int k = 0; k < N; k++) if (141.0 + 1.15 * k < tp) expz++;
      n_codes = 0;
      repeat (12) begin
        #(tp / 2.0) sig = 1'b1;
        #(tp / 2.0) sig = 1'b0;
      end
      chk(s_period == SW'((expz == 0) ? 0 : expz - 1),
          $sformatf("T=%f code %0d expected %0d", tp, s_period, expz));
      chk((q & ~({N{1'b1}} << expz)) == '0 && (expz == 64 || q[expz]), $sformatf("T=%f q=%h", tp, q));
      chk(n_codes >= 10 && n_codes <= 13, $sformatf("T=%f codes per 12 periods %0d", tp, n_codes));
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
