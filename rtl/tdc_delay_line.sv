`timescale 1ns/1ps
// tdc_delay_line: behavioural model of the TDC's input multiplexer and
// auto-calibrated delay line. Not synthesizable: the real part is a chain of
// analog source-coupled-logic cells.
//
// The multiplexer passes IF2 (operation) or the 6 MHz reference FREF
// (calibration, sel_ref = 1). Its output goes through the coarse delay dT1
// (141 ns nominal) and then through N_TAPS-1 fine cells of dT2 (1.15 ns
// nominal); tap k, C[k], is therefore delayed by dT1 + k*dT2. All cells share
// the bias trim word itrim. These structure and nominal values follow the
// design, as does building dT1 from several coarse cells; their number
// (N_COARSE = 4, 35.25 ns each) is this model's choice, and the
// delay-versus-trim law is the one of tdc_delay_cell.
//
// Interface: if2, fref, sel_ref and itrim in; mux_out (the undelayed signal
// that the sampling flip-flops read) and c[N_TAPS-1:0] out. Timing is
// continuous; PROC scales every delay to model a corner.
module tdc_delay_line #(
  parameter int unsigned N_TAPS      = gfsk_pkg::N_TAPS,
  parameter int unsigned ITRIM_W     = gfsk_pkg::ITRIM_W,
  parameter real         T_COARSE_NS = gfsk_pkg::T_COARSE_NS,
  parameter real         T_FINE_NS   = gfsk_pkg::T_FINE_NS,
  parameter int unsigned N_COARSE    = 4,
  parameter real         PROC        = 1.0
) (
  input  logic               if2,
  input  logic               fref,
  input  logic               sel_ref,
  input  logic [ITRIM_W-1:0] itrim,
  output logic               mux_out,
  output logic [N_TAPS-1:0]  c
);
  assign mux_out = sel_ref ? fref : if2;

  // coarse section: N_COARSE equal cells sharing dT1
  logic [N_COARSE:0] cc;
  assign cc[0] = mux_out;
  for (genvar j = 0; j < N_COARSE; j++) begin : g_coarse
    tdc_delay_cell #(.T_NOM_NS(T_COARSE_NS / N_COARSE), .PROC(PROC), .TRIM_W(ITRIM_W))
      u_coarse (.din(cc[j]), .itrim(itrim), .dout(cc[j+1]));
  end
  assign c[0] = cc[N_COARSE];

  for (genvar k = 1; k < N_TAPS; k++) begin : g_fine
    tdc_delay_cell #(.T_NOM_NS(T_FINE_NS), .PROC(PROC), .TRIM_W(ITRIM_W))
      u_fine (.din(c[k-1]), .itrim(itrim), .dout(c[k]));
  end
endmodule
