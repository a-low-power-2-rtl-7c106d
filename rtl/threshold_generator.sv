`timescale 1ns/1ps
// threshold_generator: peak/valley detection and decision-threshold
// generation for the data slicer.
//
// The eight most recent filter outputs M0 (newest) .. M7 (oldest) are held in
// a shift register. M2 is a valley when M7>=M6>=M5>=M4>=M3>=M2<M1<=M0 and a
// peak when M7<=M6<=M5<=M4<=M3<=M2>M1>=M0: a monotone approach of five steps
// followed by a turn of two, which rejects small noise ripples. When a run of
// interlaced peaks and valleys is seen, as during the alternating preamble,
// the threshold is set half-way between the last peak and the last valley;
// later runs of the same alternating pattern update it, which tracks a
// drifting transmitter frequency or a frequency offset. The detection rule
// and the generate/update policy follow the design. What counts as a run is
// this implementation's choice: ALT_GEN alternating extremes, each at most
// MAX_GAP samples after the previous one (18 samples = 1.5 bits, so the
// extremes of a 1010 pattern qualify and those around long runs of equal bits
// do not). An extreme that lies less than MIN_SWING from the previous
// extreme of the other kind is a noise ripple and is ignored. MIN_SWING = 10
// sits above the ripple of the moving sum (up to 8 when a low IF holds each
// noisy code for several samples) and below the smallest swing of a 1010
// pattern, about 16 at a 7 MHz IF (a nominal +-160 kHz deviation at 6 MHz is
// about +-4 TDC steps, +-16 on the sum of four).
//
// Interface: m_in is taken when en is high. peak/valley flag M2 of the
// current window. gen pulses when the first threshold is produced, upd when
// it is updated; threshold and thr_valid are registered.
module threshold_generator #(
  parameter int unsigned DW      = gfsk_pkg::DW,
  parameter int unsigned ALT_GEN = 4,
  parameter int unsigned MAX_GAP = 18,
  parameter int unsigned MIN_SWING = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [DW-1:0] m_in,
  output logic [DW-1:0] threshold,
  output logic          thr_valid,
  output logic          peak,
  output logic          valley,
  output logic          gen,
  output logic          upd
);
  localparam int unsigned GW = $clog2(MAX_GAP + 2);
  localparam int unsigned AW = $clog2(ALT_GEN + 1);

  typedef enum logic [1:0] {EXT_NONE, EXT_PEAK, EXT_VALLEY} ext_t;

  logic [DW-1:0] m [8];
  logic [3:0]    nfill;          // window filled once nfill reaches 8
  ext_t          last_ext;
  logic [DW-1:0] last_peak, last_valley;
  logic [GW-1:0] gap;
  logic [AW-1:0] alt_cnt;

  // Peak / valley decision on the current window.
  always_comb begin
    logic mono_dn, mono_up;
    mono_dn = 1'b1;
    mono_up = 1'b1;
    for (int i = 3; i <= 7; i++) begin
      if (!(m[i] >= m[i-1])) mono_dn = 1'b0;
      if (!(m[i] <= m[i-1])) mono_up = 1'b0;
    end
    valley = (nfill == 4'd8) && mono_dn && (m[2] < m[1]) && (m[1] <= m[0]);
    peak   = (nfill == 4'd8) && mono_up && (m[2] > m[1]) && (m[1] >= m[0]);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) m[i] <= '0;
      nfill       <= '0;
      last_ext    <= EXT_NONE;
      last_peak   <= '0;
      last_valley <= '0;
      gap         <= '0;
      alt_cnt     <= '0;
      threshold   <= '0;
      thr_valid   <= 1'b0;
      gen         <= 1'b0;
      upd         <= 1'b0;
    end else begin
      gen <= 1'b0;
      upd <= 1'b0;
      if (en) begin
        m[0] <= m_in;
        for (int i = 1; i < 8; i++) m[i] <= m[i-1];
        if (nfill != 4'd8) nfill <= nfill + 1'b1;
        if (gap != GW'(MAX_GAP + 1)) gap <= gap + 1'b1;

        if ((peak && !(last_ext == EXT_VALLEY && m[2] < last_valley + DW'(MIN_SWING))) ||
            (valley && !(last_ext == EXT_PEAK && m[2] + DW'(MIN_SWING) > last_peak))) begin
          logic [DW-1:0] pk, vl;
          logic [AW-1:0] na;
          ext_t          t;
          t  = peak ? EXT_PEAK : EXT_VALLEY;
          pk = peak   ? m[2] : last_peak;
          vl = valley ? m[2] : last_valley;
          if (last_ext != EXT_NONE && last_ext != t && gap <= GW'(MAX_GAP))
            na = (alt_cnt == AW'(ALT_GEN)) ? alt_cnt : alt_cnt + 1'b1;
          else
            na = AW'(1);
          alt_cnt     <= na;
          last_ext    <= t;
          last_peak   <= pk;
          last_valley <= vl;
          gap         <= '0;
          if (na == AW'(ALT_GEN)) begin
            threshold <= DW'(({1'b0, pk} + {1'b0, vl}) >> 1);
            thr_valid <= 1'b1;
            gen       <= !thr_valid;
            upd       <= thr_valid;
          end
        end
      end
    end
endmodule
