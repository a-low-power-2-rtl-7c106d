`timescale 1ns/1ps
// cdr_divider16: divide-by-16 of the CDR reference clock into 16 phases.
//
// From a 16 MHz reference the counter produces 16 clocks of 1 MHz, each
// delayed by one reference period (1/16 of the bit) from the previous one, as
// the design's CDR requires. Phase p is high while the count is p..p+7 and
// so rises when the count becomes p. The phases are registered decodes of the
// counter (the circuit itself is this implementation's choice); the count is
// also output because the phase detector uses it as a time stamp.
module cdr_divider16 #(
  parameter int unsigned NPH = gfsk_pkg::NPH
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output logic [$clog2(NPH)-1:0] cnt,
  output logic [NPH-1:0]         phases
);
  localparam int unsigned CW = $clog2(NPH);
  logic [CW-1:0] cnt_nx;
  assign cnt_nx = cnt + 1'b1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt    <= '0;
      phases <= '0;
    end else begin
      cnt <= cnt_nx;
      for (int p = 0; p < NPH; p++)
        phases[p] <= (CW'(cnt_nx - CW'(p)) < CW'(NPH / 2));
    end
endmodule
