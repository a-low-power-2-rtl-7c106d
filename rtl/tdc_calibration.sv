`timescale 1ns/1ps
// tdc_calibration: digital auto-calibration of the TDC delay line.
//
// Before the receiver starts, the delay line is fed the 6 MHz reference
// instead of IF2 (sel_ref = 1). After a settling time the TDC code is compared
// with S_target, and the bias trim of the delay cells is adjusted until
// 1/f_ref = dT1 + S_target*dT2 holds; then the multiplexer returns to IF2.
// That procedure follows the design. The adjustment rule is this
// implementation's: a successive-approximation search over the trim word,
// most significant bit first. A trial bit is kept when the measured code is
// at most S_target (more bias current gives shorter delays and so a larger
// code), so the result is the largest trim whose code does not exceed the
// target.
//
// Interface: start (pulse) begins a calibration; s_period with its s_valid
// strobe is the TDC output in this clock domain. busy is high during the
// search, done is high afterwards until the next start. Timing: per trim bit,
// SETTLE clock cycles of settling, then the next valid code; ITRIM_W bits in
// all. itrim resets to mid-scale.
module tdc_calibration #(
  parameter int unsigned ITRIM_W  = gfsk_pkg::ITRIM_W,
  parameter int unsigned SW       = gfsk_pkg::SW,
  parameter int unsigned S_TARGET = gfsk_pkg::S_TARGET,
  parameter int unsigned SETTLE   = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [SW-1:0]      s_period,
  input  logic               s_valid,
  output logic               sel_ref,
  output logic [ITRIM_W-1:0] itrim,
  output logic               busy,
  output logic               done
);
  typedef enum logic [1:0] {IDLE, SETTLING, MEASURE, FINISHED} state_t;
  state_t state;

  logic [$clog2(SETTLE+1)-1:0] wait_cnt;
  logic [$clog2(ITRIM_W)-1:0]  bit_idx;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state    <= IDLE;
      itrim    <= ITRIM_W'(1) << (ITRIM_W - 1);
      wait_cnt <= '0;
      bit_idx  <= '0;
    end else begin
      unique case (state)
        IDLE, FINISHED:
          if (start) begin
            state    <= SETTLING;
            bit_idx  <= $bits(bit_idx)'(ITRIM_W - 1);
            itrim    <= ITRIM_W'(1) << (ITRIM_W - 1);   // first trial: MSB only
            wait_cnt <= '0;
          end
        SETTLING:
          if (wait_cnt == $bits(wait_cnt)'(SETTLE)) state <= MEASURE;
          else wait_cnt <= wait_cnt + 1'b1;
        MEASURE:
          if (s_valid) begin
            logic [ITRIM_W-1:0] t;
            t = itrim;
            if (s_period > SW'(S_TARGET)) t[bit_idx] = 1'b0;   // too fast: drop bit
            if (bit_idx == 0) begin
              state <= FINISHED;
            end else begin
              t[bit_idx - 1'b1] = 1'b1;                          // next trial bit
              bit_idx  <= bit_idx - 1'b1;
              state    <= SETTLING;
              wait_cnt <= '0;
            end
            itrim <= t;
          end
        default: state <= IDLE;
      endcase
    end

  assign busy    = (state == SETTLING) || (state == MEASURE);
  assign done    = (state == FINISHED);
  assign sel_ref = busy;
endmodule
