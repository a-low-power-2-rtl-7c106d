`timescale 1ns/1ps
// lo_div8_quad: divide-by-eight quadrature generator for LO2.
//
// The receiver's second LO is the first LO divided by eight, which gives
// quadrature I/Q phases without a polyphase filter (as in the design); the
// same VCO/8 clock drives the synthesizer's divide-by-N. A four-stage Johnson
// (twisted-ring) counter has eight states per cycle and each stage is a 50%
// square wave at f/8; stage 2 lags stage 0 by two input cycles, a quarter of
// the output period, so stage 0 is I and stage 2 is Q. The circuit is this
// implementation's choice. Reset sets all stages to 0, a legal ring state.
module lo_div8_quad (
  input  logic clk,
  input  logic rst_n,
  output logic lo_i,
  output logic lo_q
);
  logic [3:0] ring;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ring <= '0;
    else        ring <= {ring[2:0], ~ring[3]};
  assign lo_i = ring[0];
  assign lo_q = ring[2];
endmodule
