`timescale 1ns/1ps
// gfsk_pkg: constants shared by the GFSK transceiver's digital blocks.
//
// The numbers marked "from the design" are the ones the transceiver is built
// around: a 6 MHz second IF, a self-sampling TDC with a 141 ns coarse delay and
// 63 fine delay cells of 1.15 ns (64 sampling taps), a 6-bit period code, 12
// slicer decisions per 1 Mb/s bit, a 16-phase CDR, and a 32-band VCO. The
// others (trim width, calibration target, filter lengths) are this
// implementation's choices and are explained where they are used.
package gfsk_pkg;
  // Time-to-digital converter (from the design)
  localparam int unsigned N_TAPS       = 64;    // sampling taps C[0..N-1]
  localparam int unsigned SW           = 6;     // width of S_period (0..63)
  localparam real         T_COARSE_NS  = 141.0; // coarse delay dT1
  localparam real         T_FINE_NS    = 1.15;  // fine delay dT2
  // Delay-line calibration: 1/f_ref = dT1 + S_target*dT2 with f_ref = 6 MHz
  // gives S_target = (166.67 - 141) / 1.15 = 22.3, rounded down.
  localparam int unsigned S_TARGET     = 22;
  localparam int unsigned ITRIM_W      = 6;     // bias trim word (own choice)
  // Demodulator DSP
  localparam int unsigned DEC_PER_BIT  = 12;    // decisions per bit (from the design)
  localparam int unsigned MA_LEN       = 4;     // moving-average length (own choice)
  localparam int unsigned DW           = SW + $clog2(MA_LEN); // filter output width
  // CDR
  localparam int unsigned NPH          = 16;    // 16 MHz / 16 -> 16 phases of 1 MHz
  // Synthesizer
  localparam int unsigned BANDW        = 5;     // 32 VCO sub-ranges (from the design)
  localparam int unsigned NW           = 12;    // integer-N ratio width (own choice)
  // Transmitter Gaussian filter (own choices: BT = 0.5, 16x oversampling)
  localparam int unsigned OSR          = 16;
  localparam int unsigned DACW         = 8;
endpackage
