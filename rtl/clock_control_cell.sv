// clock_control_cell - per-phase delay and duty-cycle adjuster, behavioural
// model (analog cell).
// The delay part (current-starved inverters, coarse and fine stages driven by
// thermometer codes) shifts both edges by c_dly * DLY_LSB_PS. The duty part
// sinks or sources extra current at the output stage and so moves only the
// falling edge, by (c_duty - 2^(DUTY_W-1)) * DUTY_LSB_PS: code 32 leaves the
// duty cycle unchanged, higher codes widen the high phase. Moving only the
// falling edge keeps the duty loop from disturbing the phase loop, which
// compares rising edges.
// Code widths (6 and 6 bits) and the 250 fs delay step are the document's; the
// duty step of 0.26 % of a 125 ps period is the document's measured value; the
// intrinsic delay BASE_PS is this model's assumption.
module clock_control_cell #(
  parameter int unsigned DLY_W       = 6,
  parameter int unsigned DUTY_W      = 6,
  parameter real         DLY_LSB_PS  = 0.25,
  parameter real         DUTY_LSB_PS = 0.325,
  parameter real         BASE_PS     = 20.0
) (
  input  logic              ck_in,
  input  logic [DLY_W-1:0]  c_dly,
  input  logic [DUTY_W-1:0] c_duty,
  output logic              ck_out
);
  timeunit 1ps; timeprecision 1fs;

  localparam int DUTY_MID = 2 ** (DUTY_W - 1);

  initial ck_out = 1'b0;

  // Transport delay; a falling edge gets the extra duty-control delay.
  always @(ck_in)
    ck_out <= #(BASE_PS + DLY_LSB_PS * real'(c_dly)
                + (ck_in ? 0.0 : DUTY_LSB_PS * real'(int'(c_duty) - DUTY_MID))) ck_in;
endmodule
