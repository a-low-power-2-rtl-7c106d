`timescale 1ns/1ps
// tdc_sampler: flip-flop bank and thermometer-to-binary encoder of the
// self-sampling time-to-digital converter.
//
// Flip-flop k is clocked by C[k], the input signal delayed by dT1 + k*dT2,
// and samples the undelayed signal. With dT1 longer than half an IF period,
// a tap whose delay is shorter than the IF period sees the signal still low
// (0), and a longer tap sees the next period already started (1). The code
// Q[N-1:0] is thus 1..10..0 and the number of zeros measures how far the
// period reaches past dT1, in units of dT2 (structure and code orientation as
// in the design). The encoder finds the lowest tap that sampled a 1 and
// outputs its index minus one, so that S_period = floor((T - dT1)/dT2): 0 at
// T = dT1 = 141 ns and 63 at dT1 + 63*dT2 = 213 ns, which with 64 taps fills
// the 6-bit code exactly (0 for shorter periods, 63 for longer ones). Taps
// that reach past one and a half periods (where the signal is low again) are
// ignored by searching from the bottom.
//
// Timing: S_period is registered at the rising edge of C[N-1], when all taps
// of one period have been sampled, from the flops' contents plus the sample
// taken at that same edge. s_toggle flips with every new code, for a
// downstream clock-domain crossing. One code per IF period, no dead time.
module tdc_sampler #(
  parameter int unsigned N_TAPS = gfsk_pkg::N_TAPS,
  parameter int unsigned SW     = gfsk_pkg::SW
) (
  input  logic              rst_n,
  input  logic              sig,
  input  logic [N_TAPS-1:0] c,
  output logic [N_TAPS-1:0] q,
  output logic [SW-1:0]     s_period,
  output logic              s_toggle
);
  localparam int unsigned CW = $clog2(N_TAPS + 1);

  for (genvar k = 0; k < N_TAPS; k++) begin : g_ff
    logic qk;                 // flip-flop k, clocked by its own tap
    always_ff @(posedge c[k] or negedge rst_n)
      if (!rst_n) qk <= 1'b0;
      else        qk <= sig;
    assign q[k] = qk;
  end

  // Position of the 0->1 transition, counted from tap 0: the number of taps
  // whose delay is shorter than the period. Taps past one and a half periods
  // see the signal low again; searching from the bottom ignores them.
  function automatic logic [SW-1:0] encode(input logic [N_TAPS-1:0] th);
    logic [CW-1:0] pos;
    logic          found;
    pos   = CW'(N_TAPS);
    found = 1'b0;
    for (int i = 0; i < N_TAPS; i++)
      if (th[i] && !found) begin
        pos   = CW'(i);
        found = 1'b1;
      end
    if (pos == '0) return '0;                       // period shorter than dT1
    if (pos - 1'b1 > CW'(2 ** SW - 1)) return SW'(2 ** SW - 1);
    return SW'(pos - 1'b1);
  endfunction

  always_ff @(posedge c[N_TAPS-1] or negedge rst_n)
    if (!rst_n) begin
      s_period <= '0;
      s_toggle <= 1'b0;
    end else begin
      s_period <= encode({sig, q[N_TAPS-2:0]});
      s_toggle <= ~s_toggle;
    end
endmodule
