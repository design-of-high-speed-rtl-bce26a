// div4 - divide-by-4 of a selected clock (CK_MUX0 or CK_MUX1).
// Two cascaded D flip-flops form a twisted ring. The first stage loads the NOR
// of the second stage and the reset request, the second stage copies the first,
// so the pair runs 00 -> 10 -> 11 -> 01 -> 00 and the second stage is a 50% duty
// clock at a quarter of the input rate.
// Reset: the NOR input blocks the ring while rst_n is low, and the same rst_n
// also clears both stages asynchronously, so the divider starts from 00 even
// when its input clock is stopped (gated) during reset. After rst_n rises,
// ck_div4 rises on the second input edge, which the power-up sequence relies on.
// The document gives the two flip-flops and the NOR used for reset; the exact
// wiring of the ring is this design's own choice.
module div4 (
  input  logic ck,
  input  logic rst_n,
  output logic ck_div4
);
  timeunit 1ps; timeprecision 1fs;

  logic q1, q2;

  always_ff @(posedge ck or negedge rst_n) begin
    if (!rst_n) begin
      q1 <= 1'b0;
      q2 <= 1'b0;
    end else begin
      q1 <= ~(q2 | ~rst_n);
      q2 <= q1;
    end
  end

  assign ck_div4 = q2;
endmodule
