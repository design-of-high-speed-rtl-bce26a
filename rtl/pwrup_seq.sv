// pwrup_seq - power-up sequence of the two divide-by-4 units.
// The selection logic runs on CK_MUX0/4, the BBPD sampling and the
// deserializer on CK_MUX1/4. Both dividers are free-running twisted rings, so
// their relative phase is fixed only by the order in which they are started.
// This block keeps CK_MUX1's divider in reset until CK_MUX0's divider is running:
// it passes CK0,DIV4 through a chain of CK_MUX1 flip-flops (two for
// synchronisation, two more to place the phase) and, on the first rising edge at
// the end of the chain, raises en1 and keeps it high until rst_n falls.
// Result: CK1,DIV4 rises on the third CK_MUX1 edge of every selection slot.
// The first CK_MUX1 edge of a slot meets the delayed clock of the previous pair
// and gives a meaningless result; the second is the first true comparison of
// the new pair, so the sample taken on the third edge holds the new pair's
// result.
// Interface: ck_mux1 clock, rst_n asynchronous active low, ck0_div4 input,
// en1 output (reset request of the second divider, active low).
// The need for a power-up sequence is from the document; the step sequence
// itself is this design's choice.
module pwrup_seq (
  input  logic ck_mux1,
  input  logic rst_n,
  input  logic ck0_div4,
  output logic en1
);
  timeunit 1ps; timeprecision 1fs;

  logic s1, s2, s3, s4, s5;

  always_ff @(posedge ck_mux1 or negedge rst_n) begin
    if (!rst_n) begin
      s1  <= 1'b0;
      s2  <= 1'b0;
      s3  <= 1'b0;
      s4  <= 1'b0;
      s5  <= 1'b0;
      en1 <= 1'b0;
    end else begin
      s1 <= ck0_div4;
      s2 <= s1;
      s3 <= s2;
      s4 <= s3;
      s5 <= s4;
      if (s4 && !s5) en1 <= 1'b1;
    end
  end
endmodule
