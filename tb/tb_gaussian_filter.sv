`timescale 1ns/1ps
// tb_gaussian_filter: sends a preamble and random bits at 1 Mb/s and records
// the DAC code at every 16 MHz clock. The reference is computed here from
// the Gaussian frequency pulse itself (BT = 0.5, normal integral by Simpson's
// rule, no table): code = 128 + 127 * sum over neighbouring bits of
// (+-1) * g(t - m). After finding the one latency that aligns the streams,
// every sample must be within 2 codes of the reference, and the latency must
// be one bit plus the tx_clock synchroniser (16 + 2..4 samples).
module tb_gaussian_filter;
  logic clk = 1'b0, rst_n = 1'b0, tx_data = 1'b0, tx_clock = 1'b0;
  logic [7:0] dac_code;
  int checks = 0, failures = 0;

  gaussian_filter dut (.*);

  always #31.25 clk = ~clk;

  function automatic real phi_int(input real x);   // integral of N(0,1) density from 0 to x
    real h, s;
    int n;
    n = 200;
    h = x / n;
    s = 0.0;
    for (int i = 0; i <= n; i++) begin
      real u, w;
      u = h * i;
      w = (i == 0 || i == n) ? 1.0 : ((i % 2 == 1) ? 4.0 : 2.0);
      s += w * $exp(-u * u / 2.0);
    end
    return s * h / 3.0 / $sqrt(2.0 * 3.14159265358979);
  endfunction
  function automatic real qf(input real x);
    return 0.5 - phi_int(x);
  endfunction
  function automatic real g(input real t);
    real a;
    a = 2.0 * 3.14159265358979 * 0.5 / $sqrt($ln(2.0));
    return qf(a * (t - 0.5)) - qf(a * (t + 0.5));
  endfunction

  int samples [$];
  always @(posedge clk) if (rst_n) samples.push_back(int'(dac_code));

  localparam int NB = 120;
  bit bits [NB];

  initial begin
    real expv [NB][16];
    for (int j = 0; j < NB; j++) bits[j] = (j < 16) ? bit'(j % 2) : bit'($urandom);
    for (int j = 1; j < NB - 1; j++)
      for (int p = 0; p < 16; p++) begin
        real tau, v;
        tau = (p + 0.5) / 16.0 - 0.5;
        v = 0.0;
        for (int m = -1; m <= 1; m++) v += (bits[j + m] ? 1.0 : -1.0) * g(tau - m);
        expv[j][p] = 128.0 + 127.0 * v;
      end
    #1 rst_n = 1'b1;      // first sample at 31.25 ns is index 0
    for (int j = 0; j < NB; j++) begin
      #500 tx_data = bits[j];
      tx_clock = 1'b1;    // rising edge at 1000*j + 501 ns
      #500 tx_clock = 1'b0;
    end
    #2000;
    begin
      int best_l;
      real best_err;
      best_err = 1.0e9; best_l = -1;
      for (int l = 0; l < 40; l++) begin
        real err;
        err = 0.0;
        for (int j = 2; j < NB - 2; j++)
          for (int p = 0; p < 16; p++) begin
            int n;
            n = int'($ceil((1000.0 * j + 501.0 - 31.25) / 62.5)) + l + p;
            err += (samples[n] - expv[j][p]) * (samples[n] - expv[j][p]);
          end
        if (err < best_err) begin best_err = err; best_l = l; end
      end
      checks++;
      if (!(best_l >= 18 && best_l <= 20)) begin failures++; $display("FAIL latency %0d", best_l); end
      for (int j = 2; j < NB - 2; j++)
        for (int p = 0; p < 16; p++) begin
          int n;
          real d;
          n = int'($ceil((1000.0 * j + 501.0 - 31.25) / 62.5)) + best_l + p;
          d = samples[n] - expv[j][p];
          checks++;
          if (d > 2.0 || d < -2.0) begin
            failures++;
            $display("FAIL bit %0d phase %0d code %0d expected %f", j, p, samples[n], expv[j][p]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
