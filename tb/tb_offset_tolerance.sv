`timescale 1ns/1ps
// tb_offset_tolerance: frequency-offset tolerance of the TDC demodulator.
// The receiver must work for any carrier offset that keeps the modulated IF
// period inside the delay line's range, 141 ns to 141 + 63*1.15 ns
// (7.09 MHz down to 4.68 MHz). With +-160 kHz deviation around a 6 MHz IF
// that allows offsets from about -1.16 MHz to +0.93 MHz. For each offset in
// {-1000, -500, 0, +500, +850} kHz the testbench resets the demodulator and
// sends a 140-bit packet (16-bit 1010 preamble, random data) as a
// Gaussian-shaped (BT = 0.5), hard-limited IF with +-0.5 ns edge jitter
// through an ideal delay line (141 + 1.15*k ns). The data recovered at the
// recovered clock must match the sent bits at a fixed lag without error,
// and the threshold, read at 80% of the packet, must lie near the code sum
// expected for that offset:
// 4*((1e9/f - 141)/1.15 - 0.5) within 5 LSB (the mean code of a floor
// quantiser is half a step below the exact ratio).
module tb_offset_tolerance;
  localparam int N = 64;
  logic clk = 1'b0, clk16 = 1'b0, rst_n = 1'b0, sig = 1'b0, dsp_en = 1'b0;
  logic [N-1:0] c = '0;
  logic [N-1:0] tdc_q;
  logic [5:0] s_period;
  logic s_valid;
  logic [7:0] lpf_out, threshold;
  logic thr_valid, raw_data, voted_data, rx_data, rx_clock;
  logic ev_peak, ev_valley, ev_thr_gen, ev_thr_upd, ev_glitch, ev_cdr_jump, ev_cdr_step, cdr_locked;
  logic [3:0] cdr_phase;
  int checks = 0, failures = 0;

  digital_demodulator #(.N_TAPS(N), .SW(6)) dut (.*);

  always #41.6667 clk = ~clk;
  always #31.25 clk16 = ~clk16;

  for (genvar k = 0; k < N; k++) begin : g_tap
    always @(sig) fork
      automatic logic v = sig;
      begin #(141.0 + 1.15 * k) c[k] = v; end
    join_none
  end

  // ---------------- GFSK IF source ----------------
  localparam real PI = 3.14159265358979;
  function automatic real phi_int(input real x);
    real h, s;
    h = x / 40;
    s = 0.0;
    for (int i = 0; i <= 40; i++) begin
      real u, w;
      u = h * i;
      w = (i == 0 || i == 40) ? 1.0 : ((i % 2 == 1) ? 4.0 : 2.0);
      s += w * $exp(-u * u / 2.0);
    end
    return s * h / 3.0 / $sqrt(2.0 * PI);
  endfunction
  function automatic real g(input real t);
    real a;
    a = 2.0 * PI * 0.5 / $sqrt($ln(2.0));
    return phi_int(a * (t + 0.5)) - phi_int(a * (t - 0.5));
  endfunction

  localparam int NB = 140;
  bit bits [NB];
  real bit_ns = 1000.5;
  real jit = 0.25;  // edge jitter, uniform +-0.5 ns
  real t_start;
  int n_gen = 0, n_upd = 0, n_glitch = 0, n_jump = 0, n_step = 0;
  always @(posedge clk) if (rst_n) begin
    n_gen    += int'(ev_thr_gen);
    n_upd    += int'(ev_thr_upd);
    n_glitch += int'(ev_glitch);
  end
  always @(posedge clk16) if (rst_n) begin
    n_jump += int'(ev_cdr_jump);
    n_step += int'(ev_cdr_step);
  end

  bit got [$];
  always @(posedge rx_clock) if (cdr_locked && rst_n) got.push_back(rx_data);

  function automatic real shaped(input real t_ns);
    real u, v;
    int j0;
    u = t_ns / bit_ns;                 // in bits
    j0 = int'($floor(u));
    v = 0.0;
    for (int j = j0 - 2; j <= j0 + 2; j++) begin
      bit b;
      b = (j < 0) ? 1'b0 : (j >= NB ? 1'b0 : bits[j]);
      v += (b ? 1.0 : -1.0) * g(u - j - 0.5);
    end
    return v;
  endfunction

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  logic [7:0] thr_mid;
  real offs [5] = '{-1000.0e3, -500.0e3, 0.0, 500.0e3, 850.0e3};

  initial begin
    foreach (offs[o]) begin
      real off;
      off = offs[o];
      rst_n = 1'b0;
      dsp_en = 1'b0;
      got.delete();
      n_gen = 0; n_upd = 0; n_glitch = 0; n_jump = 0; n_step = 0;
      for (int j = 0; j < NB; j++) bits[j] = (j < 16) ? bit'(j % 2) : bit'($urandom);
      #500 rst_n = 1'b1;
      dsp_en = 1'b1;
      t_start = $realtime + 2000.0;
      thr_mid = 0;
      while ($realtime < t_start + NB * bit_ns) begin
        real t, f, half;
        t = $realtime - t_start;
        if (thr_mid == 0 && t > 0.8 * NB * bit_ns) thr_mid = threshold;
        f = 6.0e6 + off + ((t < 0.0) ? -160.0e3 : 160.0e3 * shaped(t));
        half = 1.0e9 / (2.0 * f) + (real'($urandom_range(0, 400)) - 200.0) / 100.0 * jit;
        #(half) sig = ~sig;
      end
      #3000;
      chk(n_gen == 1, $sformatf("offset %0.0f: threshold generated %0d times", off, n_gen));
      chk(n_jump == 1, $sformatf("offset %0.0f: CDR jumps %0d", off, n_jump));
      begin
        real expect_thr;
        expect_thr = 4.0 * ((1.0e9 / (6.0e6 + off) - 141.0) / 1.15 - 0.5);
        chk(thr_valid && real'(thr_mid) > expect_thr - 5.0 && real'(thr_mid) < expect_thr + 5.0,
            $sformatf("offset %0.0f: threshold %0d, expected about %0.1f", off, thr_mid, expect_thr));
      end
      begin
        int best, lag_best, first;
        best = -1; lag_best = 0;
        first = 30;
        for (int lag = -40; lag < 10; lag++) begin
          int ok;
          ok = 0;
          for (int i = first; i < NB - 10; i++)
            if (i + lag >= 0 && i + lag < got.size() && got[i + lag] == bits[i]) ok++;
          if (ok > best) begin best = ok; lag_best = lag; end
        end
        $display("offset %0.0f Hz: threshold %0d at 80%% of the packet; bits %0d, match %0d at lag %0d; upd %0d glitch %0d step %0d",
                 off, thr_mid, NB - 10 - first, best, lag_best, n_upd, n_glitch, n_step);
        chk(best == NB - 10 - first, $sformatf("offset %0.0f: bit errors %0d", off, NB - 10 - first - best));
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
