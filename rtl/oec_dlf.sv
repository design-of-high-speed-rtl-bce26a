// oec_dlf - digital loop filter of the octa-phase error corrector.
// Input: one 8-bit word err per selection round, err[i] being the BBPD result
// of pair i, i.e. CK(i) delayed by the octa-delay line against CK(i+3).
// err[i] = 1 means the delayed CK(i) was late: code i or the octa code should go
// down, code i+3 up.
// Look-up: every clock k is judged by the two pairs it belongs to, as leader of
// pair k and as follower of pair k-3. It is a "down" candidate when
// err[k] = 1 and err[k-3] = 0 (late against both neighbours), an "up" candidate
// when err[k] = 0 and err[k-3] = 1. If all eight bits agree, the spacing error is
// common to all pairs and only the octa code moves (down if all are 1, up if
// all are 0).
// Update: at most one main code changes per word, to keep the calibration
// jitter low. Down candidates come before up candidates, so the loop removes
// delay where it can and the total delay stays near its minimum; among equal
// candidates the higher clock index wins (CK7 before CK3). Only relative delay
// matters, so when the chosen code is at its limit the other seven codes move
// one step the opposite way instead (skipped if one of them is at its limit).
// Steady state: a bang-bang loop never stops moving, it settles into a small
// limit cycle. locked rises once every code (main and octa) has stayed within
// LOCK_BAND steps of its value at the start of an observation window for
// LOCK_LEN words in a row; a larger move restarts the window. The band is two
// steps because, with one code held at zero, the limit rule moves the other
// seven codes together and the settled dither then spans two steps. lock_clr_n
// (asynchronous) clears it to restart the loop.
// Interface: clk = CK_MUX1/4, valid from the deserializer, rst_n asynchronous
// active low resets the codes to mid-scale. Codes change on the clock edge after
// valid. The candidate rule, priority and octa rule follow the document; mid-
// scale reset, one update per word and the lock criterion are this design's.
module oec_dlf
  import occ_pkg::*;
#(
  parameter int unsigned CODE_W   = 5,
  parameter int unsigned OCTA_W   = 6,
  parameter int unsigned LOCK_LEN  = 64,
  parameter int unsigned LOCK_BAND = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   lock_clr_n,
  input  logic                   valid,
  input  logic [7:0]             err,
  output logic [7:0][CODE_W-1:0] c_main,
  output logic [OCTA_W-1:0]      c_octa,
  output logic                   locked
);
  timeunit 1ps; timeprecision 1fs;

  localparam logic [CODE_W-1:0] CODE_MAX = '1;
  localparam logic [OCTA_W-1:0] OCTA_MAX = '1;
  localparam int unsigned       LCNT_W   = $clog2(LOCK_LEN + 1);

  logic [7:0] dn_c, up_c;
  logic       all1, all0, pick, shift_others, at_lim, others_ok;
  ph_idx_t    pick_k;
  upd_t       pick_dir;
  logic [LCNT_W-1:0]      lock_cnt;
  logic [7:0][CODE_W-1:0] snap_main;
  logic [OCTA_W-1:0]      snap_octa;
  logic                   moved;
  logic                   lock_rst_n;

  // Per-clock update polarity (the look-up table, written as logic).
  always_comb begin
    all1 = &err;
    all0 = ~|err;
    for (int k = 0; k < 8; k++) begin
      dn_c[k] = err[k] & ~err[(k + 5) % 8];
      up_c[k] = ~err[k] & err[(k + 5) % 8];
    end
    pick     = 1'b0;
    pick_k   = '0;
    pick_dir = UPD_NONE;
    for (int k = 0; k < 8; k++) begin
      if (up_c[k] && !(|dn_c)) begin
        pick = 1'b1; pick_k = ph_idx_t'(k); pick_dir = UPD_UP;
      end
    end
    for (int k = 0; k < 8; k++) begin
      if (dn_c[k]) begin
        pick = 1'b1; pick_k = ph_idx_t'(k); pick_dir = UPD_DN;
      end
    end
    // A code at its limit cannot move; the same relative correction is then
    // made by moving the seven other codes the opposite way.
    at_lim    = (pick_dir == UPD_DN) ? (c_main[pick_k] == '0) : (c_main[pick_k] == CODE_MAX);
    others_ok = 1'b1;
    for (int k = 0; k < 8; k++) begin
      if (ph_idx_t'(k) != pick_k) begin
        if (pick_dir == UPD_DN && c_main[k] == CODE_MAX) others_ok = 1'b0;
        if (pick_dir == UPD_UP && c_main[k] == '0)       others_ok = 1'b0;
      end
    end
    shift_others = pick && at_lim && others_ok;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 8; k++) begin
        c_main[k] <= CODE_W'(2 ** (CODE_W - 1));
      end
      c_octa <= OCTA_W'(2 ** (OCTA_W - 1));
    end else if (valid) begin
      if (all1) begin
        if (c_octa != '0) c_octa <= c_octa - 1'b1;
      end else if (all0) begin
        if (c_octa != OCTA_MAX) c_octa <= c_octa + 1'b1;
      end else if (pick) begin
        if (!at_lim) begin
          if (pick_dir == UPD_DN) c_main[pick_k] <= c_main[pick_k] - 1'b1;
          else                    c_main[pick_k] <= c_main[pick_k] + 1'b1;
        end else if (shift_others) begin
          for (int k = 0; k < 8; k++) begin
            if (ph_idx_t'(k) != pick_k) begin
              if (pick_dir == UPD_DN) c_main[k] <= c_main[k] + 1'b1;
              else                    c_main[k] <= c_main[k] - 1'b1;
            end
          end
        end
      end
    end
  end

  // Steady state: has any code left the +-LOCK_BAND band around its value at
  // the start of the current observation window? (int arithmetic: no wrap.)
  always_comb begin
    moved = (int'(c_octa) > int'(snap_octa) + int'(LOCK_BAND)) ||
            (int'(snap_octa) > int'(c_octa) + int'(LOCK_BAND));
    for (int k = 0; k < 8; k++)
      if ((int'(c_main[k]) > int'(snap_main[k]) + int'(LOCK_BAND)) ||
          (int'(snap_main[k]) > int'(c_main[k]) + int'(LOCK_BAND))) moved = 1'b1;
  end

  assign lock_rst_n = rst_n & lock_clr_n;

  always_ff @(posedge clk or negedge lock_rst_n) begin
    if (!lock_rst_n) begin
      lock_cnt  <= '0;
      locked    <= 1'b0;
      snap_main <= '0;
      snap_octa <= '0;
    end else if (valid && !locked) begin
      if (moved) begin
        lock_cnt  <= '0;
        snap_main <= c_main;
        snap_octa <= c_octa;
      end else if (lock_cnt == LCNT_W'(LOCK_LEN - 1)) begin
        locked <= 1'b1;
      end else begin
        lock_cnt <= lock_cnt + 1'b1;
      end
    end
  end
endmodule
