`timescale 1ns/1ps
// digital_demodulator: TDC-based GFSK demodulator (TDC back end and DSP).
//
// The hard-limited IF signal carries the data as a period: a 0 lengthens it,
// a 1 shortens it. The self-sampling TDC (tdc_sampler) turns every IF period
// into a 6-bit code; the DSP block then filters the codes with a moving
// average, derives a decision threshold from the peaks and valleys of the
// filtered signal (cancelling frequency offset and drift), slices 12 raw
// decisions per bit, removes glitches with an integrate-and-dump majority
// vote and finally recovers a 1 MHz clock and retimed data in the CDR. The
// chain follows the design's DSP block; the clock-domain crossing of the TDC
// code (period_capture) and the clocking are this implementation's.
//
// Interface: sig and c[] come from the delay line (sig is the undelayed
// multiplexer output). clk is the 12 MHz DSP clock, one decision per clock;
// clk16 is the 16 MHz CDR reference. dsp_en enables the DSP chain (held low
// during delay-line calibration); the CDR restarts while no threshold exists.
// Observation outputs give the codes, the threshold and one-cycle event
// pulses of each mechanism.
module digital_demodulator #(
  parameter int unsigned N_TAPS = gfsk_pkg::N_TAPS,
  parameter int unsigned SW     = gfsk_pkg::SW,
  parameter int unsigned MA_LEN = gfsk_pkg::MA_LEN,
  parameter int unsigned DW     = SW + $clog2(MA_LEN),
  parameter int unsigned NPH    = gfsk_pkg::NPH
) (
  input  logic                   clk,
  input  logic                   clk16,
  input  logic                   rst_n,
  input  logic                   sig,
  input  logic [N_TAPS-1:0]      c,
  input  logic                   dsp_en,
  output logic [N_TAPS-1:0]      tdc_q,
  output logic [SW-1:0]          s_period,
  output logic                   s_valid,
  output logic [DW-1:0]          lpf_out,
  output logic [DW-1:0]          threshold,
  output logic                   thr_valid,
  output logic                   raw_data,
  output logic                   voted_data,
  output logic                   rx_data,
  output logic                   rx_clock,
  output logic                   ev_peak,
  output logic                   ev_valley,
  output logic                   ev_thr_gen,
  output logic                   ev_thr_upd,
  output logic                   ev_glitch,
  output logic                   ev_cdr_jump,
  output logic                   ev_cdr_step,
  output logic                   cdr_locked,
  output logic [$clog2(NPH)-1:0] cdr_phase
);
  logic [SW-1:0]     s_async;
  logic              tgl_async;

  tdc_sampler #(.N_TAPS(N_TAPS), .SW(SW)) u_tdc (
    .rst_n(rst_n), .sig(sig), .c(c), .q(tdc_q), .s_period(s_async), .s_toggle(tgl_async));

  period_capture #(.SW(SW)) u_cap (
    .clk(clk), .rst_n(rst_n), .s_async(s_async), .tgl_async(tgl_async),
    .s_period(s_period), .s_valid(s_valid));

  ma_lowpass #(.SW(SW), .LEN(MA_LEN), .OW(DW)) u_lpf (
    .clk(clk), .rst_n(rst_n), .en(dsp_en), .din(s_period), .dout(lpf_out));

  threshold_generator #(.DW(DW)) u_thr (
    .clk(clk), .rst_n(rst_n), .en(dsp_en), .m_in(lpf_out), .threshold(threshold),
    .thr_valid(thr_valid), .peak(ev_peak), .valley(ev_valley), .gen(ev_thr_gen), .upd(ev_thr_upd));

  data_slicer #(.DW(DW)) u_slicer (
    .clk(clk), .rst_n(rst_n), .en(dsp_en), .thr_valid(thr_valid), .din(lpf_out),
    .threshold(threshold), .raw(raw_data));

  integrate_dump #(.LEN(3)) u_iad (
    .clk(clk), .rst_n(rst_n), .en(dsp_en && thr_valid), .raw(raw_data),
    .data(voted_data), .glitch(ev_glitch));

  // thr_valid crosses to the CDR clock through two flops
  logic [1:0] thr_sync;
  always_ff @(posedge clk16 or negedge rst_n)
    if (!rst_n) thr_sync <= '0;
    else        thr_sync <= {thr_sync[0], thr_valid};

  cdr #(.NPH(NPH)) u_cdr (
    .clk(clk16), .rst_n(rst_n), .restart(!thr_sync[1]), .din(voted_data),
    .rx_clock(rx_clock), .rx_data(rx_data), .phase_sel(cdr_phase), .locked(cdr_locked),
    .jump(ev_cdr_jump), .step(ev_cdr_step));
endmodule
