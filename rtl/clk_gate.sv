// clk_gate - glitch-free gate for one calibration clock path.
// The calibration loop is switched off, to save power, by stopping the clocks
// that enter the selection MUXes. The enable may change at any time
// (asynchronous), so it is re-timed on the falling edge of the clock, while the
// clock is low, and then ANDed with the clock: the gated clock only ever starts
// or stops with a whole high phase.
// Interface: ck in, en in (1 = pass), ck_g out. Latency of a change of en: up to
// one clock period. The document states that asynchronous clock gating turns the
// loop off; the gate circuit is this design's choice.
module clk_gate (
  input  logic ck,
  input  logic en,
  output logic ck_g
);
  timeunit 1ps; timeprecision 1fs;

  logic en_l;

  always_ff @(negedge ck) en_l <= en;

  assign ck_g = ck & en_l;
endmodule
