// mux8_5b - 5-bit controlled 8:1 clock MUX slice.
// The eight inputs are split into an even path (ck[0], ck[2], ck[4], ck[6])
// and an odd path (ck[1], ck[3], ck[5], ck[7]), each with its own 2-bit select,
// followed by a final 2:1 stage. While one path drives the output, the selection
// logic already steers the idle path to the next clock of the sequence, so when
// the final stage flips, the next clock is waiting at its input. The delay from
// a select change to the output is then always that of the last stage, whichever
// clocks are involved. Two slices with the same select make the 8:2 MUX.
// sel[4]   : 1 = odd path drives ck_out, 0 = even path
// sel[3:2] : odd path index (ck[2*sel[3:2]+1])
// sel[1:0] : even path index (ck[2*sel[1:0]])
// Purely combinational; the document's tri-state inverter stages become logic
// selection here. The split into even and odd paths follows the document; the
// bit assignment of the select is this design's choice.
module mux8_5b (
  input  logic [7:0] ck,
  input  logic [4:0] sel,
  output logic       ck_out
);
  timeunit 1ps; timeprecision 1fs;

  logic [3:0] ck_e, ck_o;
  logic       path_e, path_o;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      ck_e[k] = ck[2*k];
      ck_o[k] = ck[2*k+1];
    end
    path_e = ck_e[sel[1:0]];
    path_o = ck_o[sel[3:2]];
    ck_out = sel[4] ? path_o : path_e;
  end
endmodule
