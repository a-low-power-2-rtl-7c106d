`timescale 1ns/1ps
// integrate_dump: integrate-and-dump majority vote over raw slicer decisions.
//
// Noise makes single slicer decisions flip, leaving glitches in the raw data.
// The integrator counts the 1 decisions of a window of LEN decisions; at the
// end of the window the count is compared with half the window, the result
// becomes the output, and the integrator is dumped back to the constant 0.
// The integrate / dump / compare structure follows the design; the window
// length (3 decisions, i.e. four votes per 12-decision bit) and the
// free-running window timing are this implementation's choices.
//
// Interface: raw is taken when en is high. data changes only at window ends.
// glitch pulses for one cycle when a window held a decision that disagreed
// with its majority (a removed glitch).
module integrate_dump #(
  parameter int unsigned LEN = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic raw,
  output logic data,
  output logic glitch
);
  localparam int unsigned CW = $clog2(LEN + 1);
  logic [CW-1:0] acc;     // number of 1 decisions so far in the window
  logic [CW-1:0] n;       // decisions so far in the window

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      acc    <= '0;
      n      <= '0;
      data   <= 1'b0;
      glitch <= 1'b0;
    end else begin
      glitch <= 1'b0;
      if (en) begin
        logic [CW-1:0] total;
        total = acc + CW'(raw);
        if (n == CW'(LEN - 1)) begin
          data   <= (2 * int'(total) > int'(LEN));
          glitch <= (total != 0) && (total != CW'(LEN));
          acc    <= '0;                                  // dump
          n      <= '0;
        end else begin
          acc <= total;
          n   <= n + 1'b1;
        end
      end
    end
endmodule
