// tb_octa_clock_corrector - closed-loop test of the phase and duty-cycle
// corrector. An eight-phase 8-GHz source with programmed skews (up to 5 ps) and
// duty-cycle errors (up to 3 %) feeds the corrector with its default
// parameters. After the loops have run, the rising edges must be T/8 apart
// within 1 ps and each high time T/2 within 1 ps (0.8 %). The test also counts
// the mechanisms: octa-code updates, delay-code decreases and increases,
// duty-code decreases and increases, the 1:8 update-rate ratio between the two
// loops, and the calibration disable mode (codes frozen while cal_en is low).
module tb_octa_clock_corrector;
  timeunit 1ps; timeprecision 1fs;

  localparam real T = 125.0;

  logic            rst_n, cal_en, run;
  logic [7:0]      ck_in, ck_out;
  logic [7:0][5:0] c_dly, c_duty, c_dly_prev, c_duty_prev;
  logic [5:0]      c_octa;
  logic            seq_err;
  int checks = 0, failures = 0;
  int n_octa = 0, n_dly_dn = 0, n_dly_up = 0, n_duty_dn = 0, n_duty_up = 0;
  int n_oec_words = 0, n_dcc_words = 0, n_seq_err = 0;
  realtime t_rise [8], t_high [8];

  octa_clk_src #(.PERIOD_PS(T)) u_src (.run(run), .ck(ck_in));
  octa_clock_corrector dut (.rst_n(rst_n), .cal_en(cal_en), .ck_in(ck_in), .ck_out(ck_out),
    .c_dly(c_dly), .c_duty(c_duty), .c_octa(c_octa), .seq_err(seq_err));

  for (genvar k = 0; k < 8; k++) begin : g_m
    always @(posedge ck_out[k]) t_rise[k] = $realtime;
    always @(negedge ck_out[k]) t_high[k] = $realtime - t_rise[k];
  end

  // Count code moves once per deserializer clock.
  always @(posedge dut.ck1_div4) begin
    automatic bit dly_moved = 1'b0;
    automatic bit duty_moved = 1'b0;
    for (int k = 0; k < 8; k++) begin
      if (c_dly[k]  < c_dly_prev[k])  begin n_dly_dn++;  dly_moved = 1'b1; end
      if (c_dly[k]  > c_dly_prev[k])  begin n_dly_up++;  dly_moved = 1'b1; end
      if (c_duty[k] < c_duty_prev[k]) begin n_duty_dn++; duty_moved = 1'b1; end
      if (c_duty[k] > c_duty_prev[k]) begin n_duty_up++; duty_moved = 1'b1; end
    end
    if (duty_moved) n_dcc_words++;
    c_dly_prev  <= c_dly;
    c_duty_prev <= c_duty;
  end
  always @(posedge dut.ck1_div4) if (dut.valid) n_oec_words++;
  always @(c_octa) if (rst_n) n_octa++;
  always @(posedge seq_err) begin
    n_seq_err++;
    $display("sequence error at %0.1f ns", $realtime / 1000.0);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real spacing_err();
    real worst = 0.0;
    for (int k = 0; k < 8; k++) begin
      real d = t_rise[(k + 1) % 8] - t_rise[k];
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
      real d = t_high[k] - T / 2.0;
      if (d < 0.0) d = -d;
      if (d > worst) worst = d;
    end
    return worst;
  endfunction

  initial begin
    int skew  [8] = '{0, 4000, -3000, 2000, -5000, 1000, 3000, -2000};
    int dcerr [8] = '{3750, -2500, 1250, -3750, 0, 2500, -1250, 1875};
    int words_at_freeze;
    real e;
    rst_n = 1; cal_en = 1; run = 1;
    #10 rst_n = 0; cal_en = 0;
    for (int k = 0; k < 8; k++) begin
      u_src.skew_fs[k]  = skew[k];
      u_src.dcerr_fs[k] = dcerr[k];
      t_rise[k] = 0.0;
      t_high[k] = 0.0;
    end
    c_dly_prev = '0; c_duty_prev = '0;
    #2000;
    $display("initial: spacing error %0.3f ps, duty error %0.3f ps", spacing_err(), duty_err());
    check(spacing_err() > 4.0 && duty_err() > 3.0, "input errors visible at the outputs");
    rst_n = 1;
    #1000 cal_en = 1;
    #(3.0e6);
    $display("after 3 us: spacing error %0.3f ps, duty error %0.3f ps, octa %0d",
             spacing_err(), duty_err(), c_octa);
    check(spacing_err() < 1.0, "phase spacing within 1 ps of T/8");
    check(duty_err() < 1.0, "high time within 1 ps of T/2");
    // Calibration disable mode: codes must hold while cal_en is low.
    cal_en = 0;
    #1000;
    words_at_freeze = n_oec_words;
    c_dly_prev = c_dly;
    #5000;
    check(n_oec_words == words_at_freeze, "no loop-filter words while disabled");
    check(c_dly == c_dly_prev, "delay codes frozen while disabled");
    e = spacing_err();
    check(e < 1.0, "outputs stay corrected while disabled");
    $display("mechanisms: octa %0d, delay dn %0d up %0d, duty dn %0d up %0d, OEC words %0d, DCC updates %0d, seq errors %0d",
             n_octa, n_dly_dn, n_dly_up, n_duty_dn, n_duty_up, n_oec_words, n_dcc_words, n_seq_err);
    check(n_octa > 0, "octa code updated");
    check(n_dly_dn > 0 && n_dly_up > 0, "delay codes moved both ways");
    check(n_duty_dn > 0 && n_duty_up > 0, "duty codes moved both ways");
    check(n_dcc_words * 8 <= n_oec_words + 8 && n_dcc_words * 8 >= n_oec_words - 8,
          "duty loop updates once per 8 phase-loop words");
    check(n_seq_err == 0, "no dropped selection round");
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
