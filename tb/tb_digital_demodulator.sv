`timescale 1ns/1ps
// tb_digital_demodulator: end-to-end test of the TDC back end and DSP chain.
// The testbench generates a hard-limited GFSK IF: 6 MHz carrier, +-160 kHz
// deviation shaped by a Gaussian pulse (BT = 0.5, computed here by numerical
// integration), a frequency offset that drifts from +80 kHz to +20 kHz over
// the packet, and random edge jitter. An ideal delay line (141 + 1.15*k ns)
// feeds the DUT. The packet is a 16-bit 1010 preamble and random data. The
// recovered data, read at the recovered clock, must equal the sent bits at a
// fixed lag with no error; the threshold must be generated once and updated,
// glitches must be removed at least once, and the CDR must jump once and
// step at least once (the sender's bit rate is 0.1% off).
module tb_digital_demodulator;
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

  localparam int NB = 400;
  bit bits [NB];
  real bit_ns = 1001.0;
  real jit = 0.5;   // edge jitter, uniform +-1 ns
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
  always @(posedge rx_clock) if (cdr_locked) got.push_back(rx_data);

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

  initial begin
    for (int j = 0; j < NB; j++) bits[j] = (j < 16) ? bit'(j % 2) : bit'($urandom);
    #200 rst_n = 1'b1;
    dsp_en = 1'b1;
    t_start = $realtime + 2000.0;
    // free-running IF until the packet, then modulated
    while ($realtime < t_start + NB * bit_ns) begin
      real t, f, off, half;
      t = $realtime - t_start;
      off = 80.0e3 - 60.0e3 * ((t < 0.0) ? 0.0 : t / (NB * bit_ns));
      f = 6.0e6 + off + ((t < 0.0) ? -160.0e3 : 160.0e3 * shaped(t));
      half = 1.0e9 / (2.0 * f) + (real'($urandom_range(0, 400)) - 200.0) / 100.0 * jit;
      #(half) sig = ~sig;
    end
    #3000;
    chk(n_gen == 1, $sformatf("threshold generated %0d times", n_gen));
    chk(n_upd > 0, $sformatf("threshold updates %0d", n_upd));
    chk(n_glitch > 0, $sformatf("glitches removed %0d", n_glitch));
    chk(n_jump == 1, $sformatf("CDR jumps %0d", n_jump));
    chk(n_step > 0, $sformatf("CDR steps %0d", n_step));
    begin
      int best, lag_best, first;
      best = -1; lag_best = 0;
      first = 40;
      for (int lag = -40; lag < 10; lag++) begin
        int ok;
        ok = 0;
        for (int i = first; i < NB - 10; i++)
          if (i + lag >= 0 && i + lag < got.size() && got[i + lag] == bits[i]) ok++;
        if (ok > best) begin best = ok; lag_best = lag; end
      end
      $display("bits %0d, match %0d at lag %0d; gen %0d upd %0d glitch %0d jump %0d step %0d",
               NB - 10 - first, best, lag_best, n_gen, n_upd, n_glitch, n_jump, n_step);
      chk(best == NB - 10 - first, $sformatf("bit errors %0d", NB - 10 - first - best));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #600000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
