`timescale 1ns/1ps
// ma_lowpass: moving-average lowpass filter after the TDC.
//
// The TDC output contains the baseband (period) signal plus noise from the
// whole channel-filter bandwidth; a moving average removes the excess band.
// The design specifies a moving-average filter; its length (LEN, 4 samples =
// one third of a bit at 12 samples per bit) and the choice to output the
// undivided running sum, keeping all resolution, are this implementation's.
//
// Interface: din is taken when en is high; dout is the sum of the last LEN
// accepted samples, registered (one cycle latency). Reset empties the history.
module ma_lowpass #(
  parameter int unsigned SW  = gfsk_pkg::SW,
  parameter int unsigned LEN = gfsk_pkg::MA_LEN,
  parameter int unsigned OW  = SW + $clog2(LEN)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [SW-1:0] din,
  output logic [OW-1:0] dout
);
  logic [SW-1:0] hist [LEN];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < LEN; i++) hist[i] <= '0;
      dout <= '0;
    end else if (en) begin
      hist[0] <= din;
      for (int i = 1; i < LEN; i++) hist[i] <= hist[i-1];
      // running sum: add the new sample, drop the oldest
      dout <= dout + OW'(din) - OW'(hist[LEN-1]);
    end
endmodule
