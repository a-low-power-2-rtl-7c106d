`timescale 1ns/1ps
// gaussian_filter: lookup-table Gaussian filter of the open-loop GFSK
// transmitter.
//
// The transmitter modulates the VCO directly: the data are shaped by a
// Gaussian filter, converted by a DAC and smoothed, and the resulting voltage
// shifts the VCO frequency. The shaped frequency at any instant depends only
// on the previous, current and next bit and on the position inside the bit,
// so the filter is a table indexed by those three bits and the sample phase;
// that much follows the design. The filter constants are this
// implementation's: BT = 0.5, 16 samples per bit and a three-bit span. Each
// table entry is 128 + sum over the three bits of (+1 for a 1, -1 for a 0)
// times g[k], where g is the Gaussian frequency pulse sampled at the middle
// of each 1/16 bit,
//   g[k] = round(127 * (Q(a*(t-0.5)) - Q(a*(t+0.5)))),
//   t = (k + 0.5)/16 - 1.5 bits, a = 2*pi*BT/sqrt(ln 2), Q = Gaussian tail,
// for k = 0..47 (symmetric, so only k = 0..23 are listed). A long run of ones
// gives about 255, of zeros about 1, and the carrier sits at 128.
//
// Interface: tx_data is read at each rising edge of tx_clock (the 1 MHz bit
// clock, sampled with clk = 16 MHz). Because the table needs the next bit,
// the output lags the input by one bit. dac_code (offset binary) changes once
// per clk.
module gaussian_filter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_data,
  input  logic       tx_clock,
  output logic [7:0] dac_code
);
  localparam int unsigned OSR = 16;
  localparam int unsigned PH_W = 4;

  typedef logic [7:0] lut_t [8 * OSR];

  function automatic int pulse(input int k);
    int h [24];
    h = '{0, 0, 0, 0, 0, 1, 2, 3, 5, 8, 12, 18,
          26, 35, 46, 58, 69, 81, 92, 101, 108, 114, 117, 119};
    return (k < 24) ? h[k] : h[47 - k];
  endfunction

  // index = {prev, cur, next, phase}
  function automatic lut_t build_lut();
    lut_t t;
    for (int pat = 0; pat < 8; pat++)
      for (int p = 0; p < int'(OSR); p++) begin
        int v;
        v = 128;
        v += (pat[2] ? 1 : -1) * pulse(p + 32);   // previous bit, tail of its pulse
        v += (pat[1] ? 1 : -1) * pulse(p + 16);   // current bit, centre of its pulse
        v += (pat[0] ? 1 : -1) * pulse(p);        // next bit, head of its pulse
        if (v > 255) v = 255;
        if (v < 0)   v = 0;
        t[pat * int'(OSR) + p] = 8'(v);
      end
    return t;
  endfunction

  localparam lut_t LUT = build_lut();

  logic [2:0]      clk_sync;   // tx_clock synchroniser + edge detector
  logic [2:0]      bits;       // {prev, cur, next}
  logic [PH_W-1:0] phase;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      clk_sync <= '0;
      bits     <= 3'b010;      // idle pattern ...010... is harmless; reset value
      phase    <= '0;
      dac_code <= 8'd128;
    end else begin
      clk_sync <= {clk_sync[1:0], tx_clock};
      if (clk_sync[1] && !clk_sync[2]) begin
        bits  <= {bits[1:0], tx_data};
        phase <= '0;
      end else if (phase != PH_W'(OSR - 1)) begin
        phase <= phase + 1'b1;
      end
      dac_code <= LUT[{bits, phase}];
    end
endmodule
