// dcdl - digitally controlled delay line, behavioural model (analog cell).
// The circuit is four current-starved inverter stages (two coarse, two fine)
// whose currents come from digitally switched current mirrors driven by a
// thermometer code. This model keeps only what the loop needs: both edges of
// ck_in appear at ck_out after BASE_PS + code * LSB_PS picoseconds, with
// transport-delay behaviour. The code may change at any time; the new delay
// applies to the next edge.
// Defaults: main delay line, 5-bit code, 500 fs/LSB, covering about T/8 at
// 8 GHz. The octa-delay line of the phase comparator uses CODE_W = 6,
// LSB_PS = 0.2 and a base near 3T/8. Code widths and step sizes are the
// document's; the intrinsic delay BASE_PS is this model's assumption.
module dcdl #(
  parameter int unsigned CODE_W  = 5,
  parameter real         LSB_PS  = 0.5,
  parameter real         BASE_PS = 20.0
) (
  input  logic              ck_in,
  input  logic [CODE_W-1:0] code,
  output logic              ck_out
);
  timeunit 1ps; timeprecision 1fs;

  initial ck_out = 1'b0;

  // Transport delay: every edge is scheduled with the delay valid at the
  // moment it arrives.
  always @(ck_in) ck_out <= #(BASE_PS + LSB_PS * real'(code)) ck_in;
endmodule
