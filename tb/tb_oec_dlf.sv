// tb_oec_dlf - phase-loop filter check against a reference model at the
// default parameters (5-bit main codes, 6-bit octa code, lock after 64 quiet
// words within a band of two steps). Directed words first: all ones and all zeros must move only the octa
// code; a single late clock k must lower code k only; repeated late words drive
// a code to 0, after which the other seven codes must rise instead. Then
// random words (with and without valid) are compared, code by code, against
// the model. Finally an alternating word pair that dithers one code must
// raise locked after 64 words, and lock_clr_n must clear it.
// On the ring of eight pairs spaced three apart, every word that is neither
// all ones nor all zeros contains a down candidate, so with down-first priority
// a direct increase never happens: codes rise only through the limit rule.
// The test checks that too (no direct increase in 3000 random words).
module tb_oec_dlf;
  timeunit 1ps; timeprecision 1fs;

  logic            clk = 1'b0, rst_n, lock_clr_n, valid, locked;
  logic [7:0]      err;
  logic [7:0][4:0] c_main, m_main;
  logic [5:0]      c_octa, m_octa;
  int checks = 0, failures = 0;
  int n_octa = 0, n_dn = 0, n_up = 0, n_shift = 0;

  oec_dlf dut (.clk(clk), .rst_n(rst_n), .lock_clr_n(lock_clr_n), .valid(valid), .err(err),
    .c_main(c_main), .c_octa(c_octa), .locked(locked));

  always #20 clk = ~clk;

  // Reference: candidates, priority (highest down, else highest up), limit rule.
  task automatic model_step();
    logic [7:0] dn, up;
    int pk, dir, lim, ok;
    if (!valid) return;
    if (&err) begin if (m_octa != 0) m_octa--; n_octa++; return; end
    if (~|err) begin if (m_octa != 63) m_octa++; n_octa++; return; end
    for (int k = 0; k < 8; k++) begin
      dn[k] = err[k] & ~err[(k + 5) % 8];
      up[k] = ~err[k] & err[(k + 5) % 8];
    end
    pk = -1; dir = 0;
    for (int k = 0; k < 8; k++) if (dn[k]) begin pk = k; dir = -1; end
    if (pk < 0) for (int k = 0; k < 8; k++) if (up[k]) begin pk = k; dir = 1; end
    if (pk < 0) return;
    lim = (dir < 0) ? (m_main[pk] == 0) : (m_main[pk] == 31);
    if (!lim) begin
      m_main[pk] = 5'(int'(m_main[pk]) + dir);
      if (dir < 0) n_dn++; else n_up++;
      return;
    end
    ok = 1;
    for (int k = 0; k < 8; k++)
      if (k != pk && ((dir < 0 && m_main[k] == 31) || (dir > 0 && m_main[k] == 0))) ok = 0;
    if (ok) begin
      for (int k = 0; k < 8; k++) if (k != pk) m_main[k] = 5'(int'(m_main[k]) - dir);
      n_shift++;
    end
  endtask

  task automatic apply(input logic [7:0] e, input logic v);
    @(negedge clk);
    err = e;
    valid = v;
    model_step();
    @(posedge clk) #1;
    checks++;
    if (c_main !== m_main || c_octa !== m_octa) begin
      failures++;
      $display("FAIL: err %b valid %b: main %h octa %0d, model %h %0d", e, v, c_main, c_octa,
               m_main, m_octa);
    end
  endtask

  initial begin
    rst_n = 1'b1; lock_clr_n = 1'b1; valid = 1'b0; err = '0;
    #3 rst_n = 1'b0;
    for (int k = 0; k < 8; k++) m_main[k] = 5'd16;
    m_octa = 6'd32;
    #5 rst_n = 1'b1;
    checks++;
    if (c_main !== m_main || c_octa !== m_octa) begin failures++; $display("FAIL: reset values"); end
    apply(8'hFF, 1'b1);
    apply(8'h00, 1'b1);
    apply(8'b0000_0100, 1'b1);   // clock 2 late: code 2 down
    for (int n = 0; n < 20; n++) apply(8'b0100_0000, 1'b1);  // code 6 down to 0, then shifts
    checks++;
    if (n_shift == 0 || c_main[6] != 0) begin failures++; $display("FAIL: limit shift not seen"); end
    for (int n = 0; n < 3000; n++) apply(8'($urandom), 1'($urandom_range(0, 3) != 0));
    checks++;
    if (n_octa == 0 || n_dn == 0 || n_shift == 0 || n_up != 0) begin
      failures++;
      $display("FAIL: mechanism missing octa %0d dn %0d up %0d shift %0d", n_octa, n_dn, n_up, n_shift);
    end
    // Lock: dither code 7 by one step.
    lock_clr_n = 1'b0;
    #1 checks++;
    if (locked !== 1'b0) begin failures++; $display("FAIL: lock_clr_n did not clear"); end
    lock_clr_n = 1'b1;
    for (int n = 0; n < 80; n++) apply(n % 2 ? 8'h00 : 8'hFF, 1'b1);
    checks++;
    if (locked !== 1'b1) begin failures++; $display("FAIL: no lock on one-step dither"); end
    lock_clr_n = 1'b0;
    #1 checks++;
    if (locked !== 1'b0) begin failures++; $display("FAIL: lock not cleared"); end
    lock_clr_n = 1'b1;
    // A slowly drifting code must not lock: octa code to 0, then a net drift
    // of one step per three words (up, up, down) for 150 words.
    for (int n = 0; n < 70; n++) apply(8'hFF, 1'b1);
    lock_clr_n = 1'b0;
    #1 lock_clr_n = 1'b1;
    for (int n = 0; n < 150; n++) begin
      apply((n % 3 == 2) ? 8'hFF : 8'h00, 1'b1);
      checks++;
      if (locked !== 1'b0) begin failures++; $display("FAIL: locked while octa code drifts (%0d)", c_octa); end
    end
    $display("mechanisms: octa %0d, down %0d, up %0d, limit shifts %0d", n_octa, n_dn, n_up, n_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1.0e7);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
