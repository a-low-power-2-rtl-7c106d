`timescale 1ns/1ps
// data_slicer: compares the filtered period with the decision threshold.
//
// A transmitted 1 raises the carrier frequency and so shortens the IF period,
// giving a smaller TDC code; a 0 lengthens it. The raw decision is therefore
// 1 when the filtered code is below the threshold. One decision per enabled
// clock, i.e. 12 per bit at the 12 MHz DSP clock; registered output, one
// cycle latency. Decisions are forced to 0 while no threshold is valid.
module data_slicer #(
  parameter int unsigned DW = gfsk_pkg::DW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          thr_valid,
  input  logic [DW-1:0] din,
  input  logic [DW-1:0] threshold,
  output logic          raw
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  raw <= 1'b0;
    else if (en) raw <= thr_valid && (din < threshold);
endmodule
