// bbpd_des - deserializer of the phase-detector results.
// One BBPD result arrives per selection slot (one rising edge of CK_MUX1/4).
// The result sampled at an edge belongs to the pair that was selected one slot
// earlier, because the BBPD's own flip-flop adds one slot; so the pair index
// idx and SEL[4] are registered once and the result is written into bit
// idx_d of the lane's word. SEL[4] is also checked against the index: it must
// equal idx_d[0] (odd path for odd pairs), and the indices must arrive in
// backward order 7, 6, ..., 0. When the slot of pair 0 has been written, the
// completed words go out with a one-cycle valid strobe; a round that skipped a
// slot or failed the SEL[4] check is dropped (seq_err pulses instead).
// LANES = 1 gives the 1:8 deserializer of the phase-only corrector; LANES = 2
// gives the 2:16 deserializer that carries the OEC and DCC results side by side.
// Interface: ck = CK_MUX1/4, rst_n asynchronous active low; word/valid/seq_err
// change on ck. The lane count and the SEL[4] check follow the document; the
// use of the pair index for bit placement is this design's choice.
module bbpd_des
  import occ_pkg::*;
#(
  parameter int unsigned LANES = 1
) (
  input  logic                  ck,
  input  logic                  rst_n,
  input  logic [LANES-1:0]      din,
  input  ph_idx_t               idx,
  input  logic                  sel4,
  output logic [LANES-1:0][7:0] word,
  output logic                  valid,
  output logic                  seq_err
);
  timeunit 1ps; timeprecision 1fs;

  ph_idx_t                idx_d, idx_prev;
  logic                   sel4_d, primed, in_round, round_ok;
  logic [LANES-1:0][7:0]  sh;
  logic                   slot_ok;

  always_comb slot_ok = (sel4_d == idx_d[0]) && (idx_d == 3'd7 || idx_d == idx_prev - 3'd1);

  always_ff @(posedge ck or negedge rst_n) begin
    if (!rst_n) begin
      idx_d    <= '0;
      idx_prev <= '0;
      sel4_d   <= 1'b0;
      primed   <= 1'b0;
      in_round <= 1'b0;
      round_ok <= 1'b0;
      sh       <= '0;
      word     <= '0;
      valid    <= 1'b0;
      seq_err  <= 1'b0;
    end else begin
      idx_d   <= idx;
      sel4_d  <= sel4;
      primed  <= 1'b1;
      valid   <= 1'b0;
      seq_err <= 1'b0;
      if (primed) begin
        idx_prev <= idx_d;
        for (int l = 0; l < int'(LANES); l++) sh[l][idx_d] <= din[l];
        if (idx_d == 3'd7) begin
          in_round <= 1'b1;
          round_ok <= slot_ok;
        end else begin
          round_ok <= round_ok & slot_ok;
        end
        if (idx_d == 3'd0 && in_round) begin
          if (round_ok && slot_ok) begin
            for (int l = 0; l < int'(LANES); l++) word[l] <= {sh[l][7:1], din[l]};
            valid <= 1'b1;
          end else begin
            seq_err <= 1'b1;
          end
        end
      end
    end
  end
endmodule
