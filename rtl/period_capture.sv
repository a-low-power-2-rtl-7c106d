`timescale 1ns/1ps
// period_capture: brings the TDC period code into the DSP clock domain.
//
// The TDC code changes once per IF period at an edge of the delayed IF
// signal, unrelated to the DSP clock. The code is sampled twice in a row and
// taken only when both samples agree, so a sample caught while the code was
// changing is never used (the previous code is kept instead). The code's
// toggle bit passes a two-flop synchroniser; a change of it gives s_valid, a
// one-cycle strobe per new TDC measurement. All of this is this
// implementation's own clock-crossing choice. Latency: two to three DSP
// clocks.
module period_capture #(
  parameter int unsigned SW = gfsk_pkg::SW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [SW-1:0] s_async,
  input  logic          tgl_async,
  output logic [SW-1:0] s_period,
  output logic          s_valid
);
  logic [SW-1:0] s1, s2;
  logic [2:0]    tgl;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s1       <= '0;
      s2       <= '0;
      s_period <= '0;
      tgl      <= '0;
      s_valid  <= 1'b0;
    end else begin
      s1  <= s_async;
      s2  <= s1;
      if (s1 == s2) s_period <= s2;
      tgl     <= {tgl[1:0], tgl_async};
      s_valid <= tgl[2] ^ tgl[1];
    end
endmodule
