// tb_clock_corrector_top - end-to-end test of both correctors at their default
// parameters. Two eight-phase 8-GHz sources with programmed skews (and, for the
// second corrector, duty-cycle errors) drive the top. Both loops run at the
// same time from reset.
// Checks: the phase-only corrector reaches lock, its rising edges are T/8
// apart within 1 ps, its selector clocks stop after lock and its monitor
// output follows the selected phase; the phase-and-duty corrector brings the
// spacing and every high time within 1 ps. Each mechanism is counted and a
// mechanism that never happened is a failure: octa-code updates, main/delay
// code decreases and increases, duty code
// decreases and increases, the 1:8 duty/phase update ratio, lock, clock
// gating, and no dropped selection round in either corrector.
module tb_clock_corrector_top;
  timeunit 1ps; timeprecision 1fs;

  localparam real T = 125.0;

  logic            p1_rst_n, p1_cal_en, p2_rst_n, p2_cal_en, run;
  logic [7:0]      p1_ck_in, p1_ck_out, p2_ck_in, p2_ck_out;
  logic [2:0]      p1_mon_sel;
  logic            p1_ck_mon, p1_locked, p1_seq_err, p2_seq_err;
  logic [7:0][4:0] p1_c_main, p1_prev;
  logic [5:0]      p1_c_octa, p2_c_octa;
  logic [7:0][5:0] p2_c_dly, p2_c_duty, p2_dly_prev, p2_duty_prev;
  int checks = 0, failures = 0;
  int n1_octa = 0, n1_dn = 0, n1_up = 0, n1_lock = 0, n1_mux = 0, n1_seq = 0;
  int n2_octa = 0, n2_dn = 0, n2_up = 0, n2_duty_dn = 0, n2_duty_up = 0;
  int n2_words = 0, n2_dcc = 0, n2_seq = 0, n_mon = 0, n_mon_bad = 0;
  realtime r1 [8], r2 [8], h2 [8];

  octa_clk_src #(.PERIOD_PS(T)) u_src1 (.run(run), .ck(p1_ck_in));
  octa_clk_src #(.PERIOD_PS(T)) u_src2 (.run(run), .ck(p2_ck_in));

  clock_corrector_top dut (
    .p1_rst_n(p1_rst_n), .p1_cal_en(p1_cal_en), .p1_ck_in(p1_ck_in), .p1_ck_out(p1_ck_out),
    .p1_mon_sel(p1_mon_sel), .p1_ck_mon(p1_ck_mon), .p1_c_main(p1_c_main), .p1_c_octa(p1_c_octa),
    .p1_locked(p1_locked), .p1_seq_err(p1_seq_err),
    .p2_rst_n(p2_rst_n), .p2_cal_en(p2_cal_en), .p2_ck_in(p2_ck_in), .p2_ck_out(p2_ck_out),
    .p2_c_dly(p2_c_dly), .p2_c_duty(p2_c_duty), .p2_c_octa(p2_c_octa), .p2_seq_err(p2_seq_err));

  for (genvar k = 0; k < 8; k++) begin : g_m
    always @(posedge p1_ck_out[k]) r1[k] = $realtime;
    always @(posedge p2_ck_out[k]) r2[k] = $realtime;
    always @(negedge p2_ck_out[k]) h2[k] = $realtime - r2[k];
  end

  // Monitor output: compare with the selected corrected phase.
  always @(p1_ck_mon) begin
    n_mon++;
    #1 if (p1_ck_mon !== p1_ck_out[p1_mon_sel]) n_mon_bad++;
  end

  always @(posedge dut.u_p1.ck1_div4) begin
    for (int k = 0; k < 8; k++) begin
      if (p1_c_main[k] < p1_prev[k]) n1_dn++;
      if (p1_c_main[k] > p1_prev[k]) n1_up++;
    end
    p1_prev <= p1_c_main;
  end
  always @(posedge dut.u_p2.ck1_div4) begin
    automatic bit duty_moved = 1'b0;
    for (int k = 0; k < 8; k++) begin
      if (p2_c_dly[k]  < p2_dly_prev[k])  n2_dn++;
      if (p2_c_dly[k]  > p2_dly_prev[k])  n2_up++;
      if (p2_c_duty[k] < p2_duty_prev[k]) begin n2_duty_dn++; duty_moved = 1'b1; end
      if (p2_c_duty[k] > p2_duty_prev[k]) begin n2_duty_up++; duty_moved = 1'b1; end
    end
    if (duty_moved) n2_dcc++;
    if (dut.u_p2.valid) n2_words++;
    p2_dly_prev  <= p2_c_dly;
    p2_duty_prev <= p2_c_duty;
  end
  always @(p1_c_octa) if (p1_rst_n) n1_octa++;
  always @(p2_c_octa) if (p2_rst_n) n2_octa++;
  always @(posedge p1_locked) n1_lock++;
  always @(posedge dut.u_p1.ck_mux0) n1_mux++;
  always @(posedge p1_seq_err) n1_seq++;
  always @(posedge p2_seq_err) n2_seq++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real spacing_err(input realtime r [8]);
    real worst = 0.0;
    for (int k = 0; k < 8; k++) begin
      real d = r[(k + 1) % 8] - r[k];
      while (d < 0.0) d += T;
      while (d >= T) d -= T;
      d = d - T / 8.0;
      if (d < 0.0) d = -d;
      if (d > worst) worst = d;
    end
    return worst;
  endfunction

  function automatic real duty_err();
    real worst = 0.0;
    for (int k = 0; k < 8; k++) begin
      real d = h2[k] - T / 2.0;
      if (d < 0.0) d = -d;
      if (d > worst) worst = d;
    end
    return worst;
  endfunction

  initial begin
    int skew1 [8] = '{0, 4000, -3000, 2000, -5000, 1000, 3000, -2000};
    int skew2 [8] = '{-2000, 3000, 0, -4000, 5000, -1000, 2000, -3000};
    int dcerr [8] = '{3750, -2500, 1250, -3750, 0, 2500, -1250, 1875};
    int mux_at_lock;
    p1_rst_n = 1; p1_cal_en = 1; p2_rst_n = 1; p2_cal_en = 1; run = 1;
    p1_mon_sel = 3'd0;
    #10 p1_rst_n = 0; p1_cal_en = 0; p2_rst_n = 0; p2_cal_en = 0;
    for (int k = 0; k < 8; k++) begin
      u_src1.skew_fs[k]  = skew1[k];
      u_src2.skew_fs[k]  = skew2[k];
      u_src2.dcerr_fs[k] = dcerr[k];
      r1[k] = 0.0; r2[k] = 0.0; h2[k] = 0.0;
    end
    p1_prev = '0; p2_dly_prev = '0; p2_duty_prev = '0;
    #2000;
    $display("initial: p1 spacing %0.3f ps, p2 spacing %0.3f ps, p2 duty %0.3f ps",
             spacing_err(r1), spacing_err(r2), duty_err());
    check(spacing_err(r1) > 4.0 && spacing_err(r2) > 4.0 && duty_err() > 3.0,
          "input errors visible at the outputs");
    p1_rst_n = 1; p2_rst_n = 1;
    #1000 p1_cal_en = 1; p2_cal_en = 1;
    fork
      wait (p1_locked);
      #(3.0e6);
    join_any
    disable fork;
    check(p1_locked === 1'b1, "phase-only corrector locks");
    #1000 mux_at_lock = n1_mux;
    #(3.0e6 - $realtime + 3000.0 + 10.0);
    $display("after 3 us: p1 spacing %0.3f ps, p2 spacing %0.3f ps, p2 duty %0.3f ps",
             spacing_err(r1), spacing_err(r2), duty_err());
    check(spacing_err(r1) < 1.0, "p1 phase spacing within 1 ps of T/8");
    check(spacing_err(r2) < 1.0, "p2 phase spacing within 1 ps of T/8");
    check(duty_err() < 1.0, "p2 high time within 1 ps of T/2");
    check(n1_mux == mux_at_lock, "p1 selector clocks gated off after lock");
    for (int s = 0; s < 8; s++) begin
      p1_mon_sel = 3'(s);
      #(2.0 * T);
    end
    $display("mechanisms: p1 octa %0d dn %0d up %0d lock %0d seq %0d | p2 octa %0d dn %0d up %0d duty dn %0d up %0d words %0d dcc %0d seq %0d | mon %0d bad %0d",
             n1_octa, n1_dn, n1_up, n1_lock, n1_seq, n2_octa, n2_dn, n2_up, n2_duty_dn,
             n2_duty_up, n2_words, n2_dcc, n2_seq, n_mon, n_mon_bad);
    check(n1_octa > 0, "p1 octa code updated");
    check(n1_dn > 0, "p1 main code decreased");
    check(n1_up > 0, "p1 main code increased");
    check(n1_lock == 1, "p1 lock detected once");
    check(n_mon > 0 && n_mon_bad == 0, "monitor output follows selected phase");
    check(n2_octa > 0, "p2 octa code updated");
    check(n2_dn > 0, "p2 delay code decreased");
    check(n2_up > 0, "p2 delay code increased");
    check(n2_duty_dn > 0, "p2 duty code decreased");
    check(n2_duty_up > 0, "p2 duty code increased");
    check(n2_dcc > 0 && n2_dcc * 8 <= n2_words + 8 && n2_dcc * 8 >= n2_words - 8,
          "duty loop updates once per 8 phase-loop words");
    check(n1_seq == 0 && n2_seq == 0, "no dropped selection round");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(60.0e6);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
