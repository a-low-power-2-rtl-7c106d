`timescale 1ns/1ps
// cdr: digital-PLL clock and data recovery on 16 phases of a 1 MHz clock.
//
// The data from the integrate-and-dump filter arrives with no clock. A
// divide-by-16 of the 16 MHz reference gives 16 candidate 1 MHz clocks. The
// phase detector time-stamps every data transition with the phase count; the
// phase estimator takes the phase half a bit (8 phases) after the transition
// as the best sampling point and steers the phase selector; the selected
// phase is the recovered clock, and a flip-flop retimes the data at its
// rising edge. To lock fast, the first transition after restart sets the
// phase directly (any step size); after that only the adjacent phase can be
// selected, one step per decision, which keeps the clock jitter low. This
// structure and policy follow the design. The tracking decision is this
// implementation's: an up/down vote counter steps the phase when VOTE more
// transitions were late than early (or the reverse).
//
// Interface: din is asynchronous and passes a two-flop synchroniser, which
// delays data and time stamps alike. restart (synchronous) forgets the phase.
// rx_clock is the selected phase; rx_data changes on the reference edge at
// which rx_clock rises. jump / step pulse for a direct / adjacent phase
// change.
module cdr #(
  parameter int unsigned NPH  = gfsk_pkg::NPH,
  parameter int unsigned VOTE = 3
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   restart,
  input  logic                   din,
  output logic                   rx_clock,
  output logic                   rx_data,
  output logic [$clog2(NPH)-1:0] phase_sel,
  output logic                   locked,
  output logic                   jump,
  output logic                   step
);
  localparam int unsigned PW = $clog2(NPH);
  localparam int unsigned VW = $clog2(VOTE + 1) + 1;

  logic [PW-1:0]  cnt;
  logic [NPH-1:0] phases;

  cdr_divider16 #(.NPH(NPH)) u_div (.clk(clk), .rst_n(rst_n), .cnt(cnt), .phases(phases));

  // input synchroniser and transition (phase) detector
  logic [2:0] sync;
  logic       edge_det;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sync <= '0;
    else        sync <= {sync[1:0], din};
  assign edge_det = sync[2] ^ sync[1];

  // phase estimator: signed distance from the selected to the ideal phase
  logic [PW-1:0]    target;
  logic signed [PW:0] err;
  assign target = cnt + PW'(NPH / 2);
  always_comb begin
    logic [PW-1:0] d;
    d   = target - phase_sel;
    err = (d >= PW'(NPH / 2)) ? ($signed({1'b0, d}) - (PW+1)'(NPH)) : $signed({1'b0, d});
  end

  logic signed [VW-1:0] vote;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      phase_sel <= '0;
      locked    <= 1'b0;
      vote      <= '0;
      jump      <= 1'b0;
      step      <= 1'b0;
    end else begin
      jump <= 1'b0;
      step <= 1'b0;
      if (restart) begin
        locked <= 1'b0;
        vote   <= '0;
      end else if (edge_det) begin
        if (!locked) begin
          phase_sel <= target;            // unlimited initial step
          locked    <= 1'b1;
          jump      <= 1'b1;
          vote      <= '0;
        end else if (err > 0) begin
          if (vote == VW'(VOTE - 1)) begin
            phase_sel <= phase_sel + 1'b1;
            vote      <= '0;
            step      <= 1'b1;
          end else vote <= vote + 1'b1;
        end else if (err < 0) begin
          if (vote == -VW'(VOTE - 1)) begin
            phase_sel <= phase_sel - 1'b1;
            vote      <= '0;
            step      <= 1'b1;
          end else vote <= vote - 1'b1;
        end
      end
    end

  // phase selector and retiming flip-flop
  assign rx_clock = phases[phase_sel];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                          rx_data <= 1'b0;
    else if (cnt + 1'b1 == phase_sel)    rx_data <= sync[2];
endmodule
