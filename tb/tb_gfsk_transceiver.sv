`timescale 1ns/1ps
// tb_gfsk_transceiver: end-to-end test of the transceiver's digital core at
// its default parameters.
// 1) Start-up: the TDC delay line is calibrated against the 6 MHz reference
//    while the VCO band calibration runs on a VCO model (test only: f =
//    2256 MHz + 25.5 MHz * band at the fixed control voltage, 2 MHz
//    reference, n_div = 171). The trim word must be the largest whose code
//    for 6 MHz is at most 22 (computed here from the nominal delays), the
//    band the highest at or below 8*171*2 MHz, and the divided clocks must
//    have the right periods.
// 2) Loop-back: the transmitter's Gaussian filter output sets the
//    frequency of a hard-limited IF model: 6 MHz + offset + 160 kHz *
//    (dac_code - 128) / 127, with the offset drifting from +80 kHz to
//    +20 kHz and +-1 ns edge jitter; the sender's bit clock is 0.05% slow.
//    The IF drives the receiver. A 16-bit 1010 preamble and random data are
//    sent; the recovered data must equal them at a fixed lag with no error.
// Each mechanism must occur: both calibrations, multiplexer on the
// reference, peaks and valleys, threshold generation (once) and update,
// glitch removal, CDR initial jump (once) and adjacent steps.
module tb_gfsk_transceiver;
  logic rst_n = 1'b0, clk_dsp = 1'b0, clk16 = 1'b0;
  logic if2 = 1'b0, fref6 = 1'b0, tdc_cal_start = 1'b0, tdc_cal_done;
  logic [5:0] itrim, s_period;
  logic rx_data, rx_clock, thr_valid;
  logic tx_data = 1'b0, tx_clock = 1'b0;
  logic [7:0] dac_code;
  logic vco_clk = 1'b0, lo2_i, lo2_q, pll_fb, fref_pll = 1'b0, fll_cal_start = 1'b0;
  logic [11:0] n_div = 12'd171;
  logic [4:0] vco_band;
  logic pll_open, fll_done;
  int checks = 0, failures = 0;

  gfsk_transceiver dut (.*);

  always #41.6667 clk_dsp = ~clk_dsp;
  always #31.25   clk16 = ~clk16;
  always #83.3333 fref6 = ~fref6;
  always #250     fref_pll = ~fref_pll;

  // VCO model, running only during start-up
  bit vco_on = 1'b1;
  real f_vco;
  assign f_vco = 2256.0 + 25.5 * real'(vco_band);   // MHz
  always begin
    if (vco_on) #(500.0 / f_vco) vco_clk = ~vco_clk;
    else        #1000;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // mechanism counters
  int n_sel_ref = 0, n_peak = 0, n_valley = 0, n_gen = 0, n_upd = 0, n_glitch = 0;
  int n_jump = 0, n_step = 0;
  always @(posedge clk_dsp) if (rst_n) begin
    n_sel_ref += int'(dut.sel_ref);
    n_peak    += int'(dut.ev_peak);
    n_valley  += int'(dut.ev_valley);
    n_gen     += int'(dut.ev_thr_gen);
    n_upd     += int'(dut.ev_thr_upd);
    n_glitch  += int'(dut.ev_glitch);
  end
  always @(posedge clk16) if (rst_n) begin
    n_jump += int'(dut.ev_cdr_jump);
    n_step += int'(dut.ev_cdr_step);
  end

  bit got [$];
  always @(posedge rx_clock) if (dut.cdr_locked) got.push_back(rx_data);

  // IF model driven by the transmitter's DAC code
  bit   if_on = 1'b0;
  real  jit = 1.0;   // edge jitter scale: uniform +-1 ns
  real  t_if0, pkt_ns;
  always begin
    if (!if_on) #100;
    else begin
      real t, off, f, half;
      t = $realtime - t_if0;
      off = 80.0e3 - 60.0e3 * ((t > pkt_ns) ? 1.0 : t / pkt_ns);
      f = 6.0e6 + off + 160.0e3 * (real'(dac_code) - 128.0) / 127.0;
      half = 1.0e9 / (2.0 * f) + (real'($urandom_range(0, 200)) - 100.0) / 100.0 * jit;
      #(half) if2 = ~if2;
    end
  end

  localparam int NB = 300;
  bit bits [NB];
  localparam real BIT_NS = 1000.5;

  initial begin
    int exp_trim, exp_band;
    realtime t0;
    for (int j = 0; j < NB; j++) bits[j] = (j < 16) ? bit'(j % 2) : bit'($urandom);
    #300 rst_n = 1'b1;
    // ---------------- start-up calibrations ----------------
    #200;
    @(negedge clk_dsp) tdc_cal_start = 1'b1;
    @(negedge clk_dsp) tdc_cal_start = 1'b0;
    @(negedge fref_pll) fll_cal_start = 1'b1;
    @(negedge fref_pll) fll_cal_start = 1'b0;
    t0 = $realtime;
    while (!(tdc_cal_done && fll_done) && $realtime - t0 < 200000) #100;
    chk(tdc_cal_done, "TDC calibration finished");
    chk(fll_done && !pll_open, "VCO calibration finished, loop closed");
    exp_trim = 0;
    for (int t = 0; t < 64; t++) begin
      real f;
      f = real'(96 - t) / 64.0;
      if ((166.6667 - 141.0 * f) / (1.15 * f) < 23.0) exp_trim = t;   // floor(...) <= 22
    end
    chk(itrim == 6'(exp_trim), $sformatf("trim %0d expected %0d", itrim, exp_trim));
    exp_band = 0;
    for (int b = 0; b < 32; b++) if (2256.0 + 25.5 * b <= 16.0 * 171) exp_band = b;
    chk(vco_band == 5'(exp_band), $sformatf("band %0d expected %0d", vco_band, exp_band));
    begin
      realtime r0, r1, q0, q1;
      @(posedge pll_fb) r0 = $realtime;
      @(posedge pll_fb) r1 = $realtime;
      chk((r1 - r0) > 8.0 * 171 * 1000.0 / f_vco - 0.05 && (r1 - r0) < 8.0 * 171 * 1000.0 / f_vco + 0.05,
          $sformatf("divide-by-8N period %f", r1 - r0));
      @(posedge lo2_i) q0 = $realtime;
      @(posedge lo2_q) q1 = $realtime;
      chk((q1 - q0) > 2000.0 / f_vco - 0.01 && (q1 - q0) < 2000.0 / f_vco + 0.01, "LO2 quadrature lag");
    end
    vco_on = 1'b0;
    // ---------------- loop-back packet ----------------
    pkt_ns = NB * BIT_NS;
    t_if0 = $realtime;
    if_on = 1'b1;
    for (int j = 0; j < NB + 4; j++) begin
      #(BIT_NS / 2) tx_data = (j < NB) ? bits[j] : 1'b0;
      tx_clock = 1'b1;
      #(BIT_NS / 2) tx_clock = 1'b0;
    end
    #3000;
    chk(n_sel_ref > 0, "multiplexer switched to the reference");
    chk(n_peak > 0 && n_valley > 0, $sformatf("peaks %0d valleys %0d", n_peak, n_valley));
    chk(n_gen == 1, $sformatf("threshold generated %0d times", n_gen));
    chk(n_upd > 0, $sformatf("threshold updates %0d", n_upd));
    chk(n_glitch > 0, $sformatf("glitches removed %0d", n_glitch));
    chk(n_jump == 1, $sformatf("CDR jumps %0d", n_jump));
    chk(n_step > 0, $sformatf("CDR steps %0d", n_step));
    begin
      int best, lag_best, first, last;
      best = -1; lag_best = 0; first = 30; last = NB - 10;
      for (int lag = -40; lag < 10; lag++) begin
        int ok;
        ok = 0;
        for (int i = first; i < last; i++)
          if (i + lag >= 0 && i + lag < got.size() && got[i + lag] == bits[i]) ok++;
        if (ok > best) begin best = ok; lag_best = lag; end
      end
      $display("trim %0d band %0d; bits %0d, match %0d at lag %0d; peaks %0d valleys %0d gen %0d upd %0d glitch %0d jump %0d step %0d",
               itrim, vco_band, last - first, best, lag_best, n_peak, n_valley, n_gen, n_upd, n_glitch, n_jump, n_step);
      chk(best == last - first, $sformatf("bit errors %0d", last - first - best));
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
