// mux_sel_gen - counter-based MUX selection logic.
// Clocked by CK_MUX0 divided by 4, so each compared pair is held for four clock
// periods. The pair index idx counts backwards 7, 6, ..., 0, 7, ...: the shared
// MUX then moves from CK(i) to CK(i-1), whose next rising edge comes 7T/8 later,
// so the switch never shortens a high phase and causes no glitch.
// sel drives mux8_5b slices: sel[4] picks the path holding CK(idx); the other
// path is pre-set to CK(idx-1), the next clock. Concretely the odd path holds
// whichever of idx, idx-1 is odd and the even path whichever is even.
// Timing: idx and sel change right after the rising edge of clk_div4; they must
// settle within 7T/8 of the MUX output edge. rst_n is asynchronous, active low,
// and starts the sequence at idx = 7.
// The backward rotation and the divided clock follow the document; the counter
// encoding and reset value are this design's choice.
module mux_sel_gen
  import occ_pkg::*;
(
  input  logic       clk_div4,
  input  logic       rst_n,
  output ph_idx_t    idx,
  output logic [4:0] sel
);
  timeunit 1ps; timeprecision 1fs;

  ph_idx_t nxt, odd_i, even_i;
  logic    unused_lsb;

  always_ff @(posedge clk_div4 or negedge rst_n) begin
    if (!rst_n) idx <= 3'd7;
    else        idx <= idx - 3'd1;
  end

  always_comb begin
    nxt    = idx - 3'd1;
    odd_i  = idx[0] ? idx : nxt;
    even_i = idx[0] ? nxt : idx;
    sel    = {idx[0], odd_i[2:1], even_i[2:1]};
    unused_lsb = odd_i[0] ^ even_i[0];  // always 1: one odd, one even
  end
endmodule
