// bbpd - bang-bang phase detector, behavioural model (analog arbiter).
// The arbiter is a sense-amplifier front end on a cross-coupled NAND SR latch:
// the input whose rising edge comes first sets the latch, which holds until the
// next race. The model decides on the first rising edge of the two inputs
// (the other input still low) and shows the decision T_ARB_PS later.
// A flip-flop clocked by ck_smp (CK_MUX1 divided by 4) samples the decision.
// phase_err = 1 means i1 (the delayed clock CK_D) arrived after i2: the
// leading clock's code or the octa code must go down, the trailing clock's
// code up. The arbiter and the sampling flip-flop are the document's; the output
// polarity is chosen so that this correction rule gives negative feedback.
module bbpd #(
  parameter real T_ARB_PS = 5.0
) (
  input  logic i1,
  input  logic i2,
  input  logic ck_smp,
  input  logic rst_n,
  output logic phase_err
);
  timeunit 1ps; timeprecision 1fs;

  logic arb;
  logic i1_q, i2_q;

  initial begin
    arb  = 1'b0;
    i1_q = 1'b0;
    i2_q = 1'b0;
  end

  // The latch: the input that rises while the other is still low wins the
  // race. Simultaneous rising edges leave the latch unchanged.
  always @(i1 or i2) begin
    if (i1 && !i1_q && !i2)      arb <= #(T_ARB_PS) 1'b0;
    else if (i2 && !i2_q && !i1) arb <= #(T_ARB_PS) 1'b1;
    i1_q = i1;
    i2_q = i2;
  end

  always_ff @(posedge ck_smp or negedge rst_n) begin
    if (!rst_n) phase_err <= 1'b0;
    else        phase_err <= arb;
  end
endmodule
