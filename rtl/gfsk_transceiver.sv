`timescale 1ns/1ps
// gfsk_transceiver: digital core of a low-power 2.4 GHz GFSK transceiver
// whose receiver demodulates with time-to-digital conversion.
//
// Receiver: the hard-limited 6 MHz second IF (if2) enters the TDC delay line
// through a multiplexer; the self-sampling TDC measures every IF period and
// the digital demodulator turns the period codes into recovered data and a
// 1 MHz clock. Before reception the delay line is calibrated against the
// 6 MHz reference fref6 (tdc_cal_start ... tdc_cal_done); the demodulator
// runs once calibration is done.
// Transmitter: tx_data / tx_clock feed the lookup-table Gaussian filter,
// whose dac_code drives the (external) DAC and Sallen-Key filter that
// modulate the VCO in open loop.
// Synthesizer: vco_clk (the external VCO) is divided by eight into the
// quadrature LO2 (lo2_i / lo2_q) and further by n_div into pll_fb for the
// external phase/frequency detector. The band calibration FLL opens the loop
// (pll_open), counts VCO/8 cycles against fref_pll and sets vco_band.
//
// This partition follows the design; the analog blocks (LNA, mixers, complex
// filter, limiter, DAC and smoothing filter, VCO, PFD, charge pump, loop
// filter, PA) are outside and meet it at the ports. The TDC delay line is an
// analog part too; it is included here as a behavioural model (not
// synthesizable) so that if2 is the input, as on the real chip. Sharing one
// divide-by-eight between LO2 and the feedback divider, and the clocking
// (12 MHz DSP clock, 16 MHz reference for CDR and Gaussian filter) are this
// implementation's choices. PROC scales the modelled delay-line delays.
// mux_out is both data (sampled by the TDC flip-flops) and, through the
// delay line, their clock; lint tools report this mixed use, which is the
// self-sampling principle itself and intended.
module gfsk_transceiver #(
  parameter int unsigned N_TAPS   = gfsk_pkg::N_TAPS,
  parameter int unsigned SW       = gfsk_pkg::SW,
  parameter int unsigned ITRIM_W  = gfsk_pkg::ITRIM_W,
  parameter int unsigned S_TARGET = gfsk_pkg::S_TARGET,
  parameter int unsigned BANDW    = gfsk_pkg::BANDW,
  parameter int unsigned NW       = gfsk_pkg::NW,
  parameter real         PROC     = 1.0
) (
  input  logic               rst_n,
  input  logic               clk_dsp,
  input  logic               clk16,
  // receiver
  input  logic               if2,
  input  logic               fref6,
  input  logic               tdc_cal_start,
  output logic               tdc_cal_done,
  output logic [ITRIM_W-1:0] itrim,
  output logic [SW-1:0]      s_period,
  output logic               rx_data,
  output logic               rx_clock,
  output logic               thr_valid,
  // transmitter
  input  logic               tx_data,
  input  logic               tx_clock,
  output logic [7:0]         dac_code,
  // synthesizer
  input  logic               vco_clk,
  output logic               lo2_i,
  output logic               lo2_q,
  input  logic [NW-1:0]      n_div,
  output logic               pll_fb,
  input  logic               fref_pll,
  input  logic               fll_cal_start,
  output logic [BANDW-1:0]   vco_band,
  output logic               pll_open,
  output logic               fll_done
);
  localparam int unsigned DW = SW + $clog2(gfsk_pkg::MA_LEN);

  // ---------------- receiver ----------------
  logic              sel_ref, mux_out, s_valid, cal_busy;
  logic [N_TAPS-1:0] taps;

  tdc_delay_line #(.N_TAPS(N_TAPS), .ITRIM_W(ITRIM_W), .PROC(PROC)) u_dline (
    .if2(if2), .fref(fref6), .sel_ref(sel_ref), .itrim(itrim),
    .mux_out(mux_out), .c(taps));

  tdc_calibration #(.ITRIM_W(ITRIM_W), .SW(SW), .S_TARGET(S_TARGET)) u_tdc_cal (
    .clk(clk_dsp), .rst_n(rst_n), .start(tdc_cal_start), .s_period(s_period),
    .s_valid(s_valid), .sel_ref(sel_ref), .itrim(itrim), .busy(cal_busy),
    .done(tdc_cal_done));

  // observation-only outputs of the demodulator
  logic [N_TAPS-1:0] tdc_q;
  logic [DW-1:0]     lpf_out, threshold;
  logic              raw_data, voted_data, ev_peak, ev_valley, ev_thr_gen, ev_thr_upd;
  logic              ev_glitch, ev_cdr_jump, ev_cdr_step, cdr_locked;
  logic [3:0]        cdr_phase;

  digital_demodulator #(.N_TAPS(N_TAPS), .SW(SW)) u_demod (
    .clk(clk_dsp), .clk16(clk16), .rst_n(rst_n), .sig(mux_out), .c(taps),
    .dsp_en(tdc_cal_done), .tdc_q(tdc_q), .s_period(s_period), .s_valid(s_valid),
    .lpf_out(lpf_out), .threshold(threshold), .thr_valid(thr_valid),
    .raw_data(raw_data), .voted_data(voted_data), .rx_data(rx_data), .rx_clock(rx_clock),
    .ev_peak(ev_peak), .ev_valley(ev_valley), .ev_thr_gen(ev_thr_gen), .ev_thr_upd(ev_thr_upd),
    .ev_glitch(ev_glitch), .ev_cdr_jump(ev_cdr_jump), .ev_cdr_step(ev_cdr_step),
    .cdr_locked(cdr_locked), .cdr_phase(cdr_phase));

  // ---------------- transmitter ----------------
  gaussian_filter u_gauss (
    .clk(clk16), .rst_n(rst_n), .tx_data(tx_data), .tx_clock(tx_clock), .dac_code(dac_code));

  // ---------------- synthesizer ----------------
  lo_div8_quad u_div8 (.clk(vco_clk), .rst_n(rst_n), .lo_i(lo2_i), .lo_q(lo2_q));

  pll_divider_n #(.NW(NW)) u_divn (.clk(lo2_i), .rst_n(rst_n), .n_div(n_div), .fb(pll_fb));

  logic [NW + 4 + 1 - 1:0] fll_count;
  vco_fll_calibration #(.BANDW(BANDW), .NW(NW)) u_fll (
    .clk_ref(fref_pll), .clk_cnt(lo2_i), .rst_n(rst_n), .start(fll_cal_start),
    .n_div(n_div), .band(vco_band), .pll_open(pll_open), .done(fll_done),
    .count(fll_count));
endmodule
