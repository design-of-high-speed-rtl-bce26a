// edge_converter - edge converter of the duty-cycle path, behavioural model
// (analog cell).
// The phase detector reacts only to rising edges. To compare a clock's falling
// edge with the rising edge of its complement, the falling edge of ck_f is
// turned into a rising edge by a skewed inverter (out_f = ~ck_f), while ck_r
// passes a matching non-inverting path (out_r = ck_r). Both paths take
// T_R2R_PS; the inverting path takes MISMATCH_PS longer, the residual mismatch
// the document reports for its sized inverters (0.05 ps on average).
// The function and the mismatch figure are the document's; the absolute delay
// is this model's assumption.
module edge_converter #(
  parameter real T_R2R_PS    = 10.0,
  parameter real MISMATCH_PS = 0.05
) (
  input  logic ck_f,
  input  logic ck_r,
  output logic out_f,
  output logic out_r
);
  timeunit 1ps; timeprecision 1fs;

  always @(ck_f) out_f <= #(T_R2R_PS + MISMATCH_PS) ~ck_f;
  always @(ck_r) out_r <= #(T_R2R_PS) ck_r;
endmodule
