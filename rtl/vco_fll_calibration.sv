`timescale 1ns/1ps
// vco_fll_calibration: VCO band auto-calibration (digital frequency-locked
// loop) of the integer-N synthesizer.
//
// The VCO's range is split into 2^BANDW sub-bands so that its gain, and with
// it phase noise and open-loop drift, stays small. Before the PLL is used the
// loop is opened and a fixed voltage is put on the VCO control (pll_open).
// A high-speed counter clocked by the VCO/8 clock counts during a window of
// WIN reference cycles; a digital comparator checks the count against the
// value n_div*WIN that a locked loop would give; a state machine uses the
// result to set the band bits. Counter, comparator and state machine follow
// the design. The search is this implementation's: successive approximation
// over the band bits, MSB first, keeping a trial bit when the count does not
// exceed the target (a higher band code is taken to mean a higher
// frequency), so the result is the highest band at or below the target.
//
// Clocks: the state machine runs on clk_ref; the counter runs on clk_cnt.
// The gate and clear commands cross with two-flop synchronisers; the count is
// read back only after the counter has stopped and SYNC_WAIT reference cycles
// have passed, so it is stable. Timing: per band bit, SETTLE + WIN +
// SYNC_WAIT + 7 reference cycles (35 with the defaults). done stays high (and the loop closed) until the
// next start.
module vco_fll_calibration #(
  parameter int unsigned BANDW     = gfsk_pkg::BANDW,
  parameter int unsigned NW        = gfsk_pkg::NW,
  parameter int unsigned WIN       = 16,
  parameter int unsigned SETTLE    = 8,
  parameter int unsigned SYNC_WAIT = 4,
  parameter int unsigned CW        = NW + $clog2(WIN) + 1
) (
  input  logic             clk_ref,
  input  logic             clk_cnt,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NW-1:0]    n_div,
  output logic [BANDW-1:0] band,
  output logic             pll_open,
  output logic             done,
  output logic [CW-1:0]    count
);
  // ---------------- counter (clk_cnt domain) ----------------
  logic          gate_ref, clr_ref;
  logic [1:0]    gate_s, clr_s;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk_cnt or negedge rst_n)
    if (!rst_n) begin
      gate_s <= '0;
      clr_s  <= '0;
      cnt    <= '0;
    end else begin
      gate_s <= {gate_s[0], gate_ref};
      clr_s  <= {clr_s[0], clr_ref};
      if (clr_s[1])       cnt <= '0;
      else if (gate_s[1]) cnt <= cnt + 1'b1;
    end

  // ---------------- state machine (clk_ref domain) ----------------
  typedef enum logic [2:0] {IDLE, SETTLING, CLEAR, GATE, READ, FINISHED} state_t;
  state_t state;
  localparam int unsigned TW = $clog2(SETTLE + WIN + SYNC_WAIT + 4);
  logic [TW-1:0]            timer;
  logic [$clog2(BANDW)-1:0] bit_idx;
  logic [CW-1:0]            target;
  logic [CW-1:0]            cnt_r1, cnt_r2;

  assign target = CW'(n_div) * CW'(WIN);

  always_ff @(posedge clk_ref or negedge rst_n)
    if (!rst_n) begin
      state    <= IDLE;
      band     <= BANDW'(1) << (BANDW - 1);
      timer    <= '0;
      bit_idx  <= '0;
      gate_ref <= 1'b0;
      clr_ref  <= 1'b0;
      cnt_r1   <= '0;
      cnt_r2   <= '0;
      count    <= '0;
    end else begin
      cnt_r1 <= cnt;      // stable whenever it is used
      cnt_r2 <= cnt_r1;
      unique case (state)
        IDLE, FINISHED:
          if (start) begin
            state   <= SETTLING;
            band    <= BANDW'(1) << (BANDW - 1);
            bit_idx <= $bits(bit_idx)'(BANDW - 1);
            timer   <= '0;
          end
        SETTLING:
          if (timer == TW'(SETTLE - 1)) begin
            state   <= CLEAR;
            clr_ref <= 1'b1;
            timer   <= '0;
          end else timer <= timer + 1'b1;
        CLEAR:
          if (timer == TW'(3)) begin        // clear seen by the counter
            clr_ref  <= 1'b0;
            gate_ref <= 1'b1;
            state    <= GATE;
            timer    <= '0;
          end else timer <= timer + 1'b1;
        GATE:
          if (timer == TW'(WIN - 1)) begin
            gate_ref <= 1'b0;
            state    <= READ;
            timer    <= '0;
          end else timer <= timer + 1'b1;
        READ:
          if (timer == TW'(SYNC_WAIT + 2)) begin
            logic [BANDW-1:0] b;
            b     = band;
            count <= cnt_r2;
            if (cnt_r2 > target) b[bit_idx] = 1'b0;   // too fast: drop bit
            if (bit_idx == 0) begin
              state <= FINISHED;
            end else begin
              b[bit_idx - 1'b1] = 1'b1;
              bit_idx <= bit_idx - 1'b1;
              state   <= SETTLING;
            end
            band  <= b;
            timer <= '0;
          end else timer <= timer + 1'b1;
        default: state <= IDLE;
      endcase
    end

  assign pll_open = (state != IDLE) && (state != FINISHED);
  assign done     = (state == FINISHED);
endmodule
