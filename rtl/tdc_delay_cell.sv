`timescale 1ns/1fs
// tdc_delay_cell: behavioural model of one trimmable source-coupled-logic
// delay cell of the TDC delay line. Not synthesizable: the real cell is an
// analog differential gate whose delay is set by its bias current.
//
// The delay is T_NOM_NS * PROC * (33 + (63 - itrim)) / 64, so mid-scale trim
// (32) gives the nominal delay, larger trim (more bias current) a shorter one,
// and PROC models a process/voltage/temperature corner. The linear law is this
// model's own choice; the design only says the delay is tuned by trimming the
// bias current. The delay is built from a fixed part and six binary-weighted
// parts, each a transport delay, so that every edge is kept even when the
// delay is longer than a pulse.
module tdc_delay_cell #(
  parameter real         T_NOM_NS = 1.15,
  parameter real         PROC     = 1.0,
  parameter int unsigned TRIM_W   = 6
) (
  input  logic              din,
  input  logic [TRIM_W-1:0] itrim,
  output logic              dout
);
  localparam real UNIT = T_NOM_NS * PROC / real'(2 ** TRIM_W);
  localparam real BASE = UNIT * real'(2 ** (TRIM_W - 1) + 1);

  logic [TRIM_W:0] stage;
  logic [TRIM_W-1:0] slow;   // a set bit adds its weight to the delay
  assign slow = ~itrim;

  initial stage = '0;
  always @(din) fork
    automatic logic v = din;
    begin #(BASE) stage[0] = v; end
  join_none

  for (genvar b = 0; b < TRIM_W; b++) begin : g_bit
    localparam real W = UNIT * real'(2 ** b);
    always @(stage[b]) begin
      if (slow[b]) fork
        automatic logic v = stage[b];
        begin #(W) stage[b+1] = v; end
      join_none
      else stage[b+1] = stage[b];
    end
  end

  assign dout = stage[TRIM_W];
endmodule
