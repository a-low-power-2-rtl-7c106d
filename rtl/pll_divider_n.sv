`timescale 1ns/1ps
// pll_divider_n: programmable integer-N divider of the frequency synthesizer.
//
// Divides the VCO/8 clock by n_div (>= 2) for the phase/frequency detector of
// the integer-N PLL, as the design's synthesizer requires. The counter counts
// down from n_div-1 to 0; the output is high for the first floor(n_div/2)
// input cycles of each period and is registered. A new n_div takes effect at
// the next period. Width and duty cycle are this implementation's choices.
module pll_divider_n #(
  parameter int unsigned NW = gfsk_pkg::NW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NW-1:0] n_div,
  output logic          fb
);
  logic [NW-1:0] cnt;
  logic [NW-1:0] n_lat;     // ratio of the current period

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt   <= '0;
      n_lat <= NW'(2);
      fb    <= 1'b0;
    end else begin
      if (cnt == '0) begin
        cnt   <= n_div - 1'b1;
        n_lat <= n_div;
        fb    <= 1'b1;
      end else begin
        cnt <= cnt - 1'b1;
        if (cnt == n_lat - (n_lat >> 1)) fb <= 1'b0;
      end
    end
endmodule
