// tb_oec_prototype1 - closed-loop test of the octa-phase error corrector.
// An eight-phase 8-GHz source with programmed skews (up to 5 ps) feeds the
// corrector with its default parameters. The test waits for the loop to report
// steady state, then measures the rising edges of the corrected clocks and
// checks that every neighbour spacing is T/8 within 1 ps and every compared
// pair spacing 3T/8 within 1 ps (main step 0.5 ps, octa step 0.2 ps). It also checks the
// mechanisms the design has: octa-code updates, main-code decreases and
// increases, the lock and the gating of the loop clocks, the restart with
// cal_en, the monitor MUX, and that no selection round was dropped.
module tb_oec_prototype1;
  timeunit 1ps; timeprecision 1fs;

  localparam real T = 125.0;

  logic            rst_n, cal_en, run;
  logic [7:0]      ck_in, ck_out;
  logic [2:0]      mon_sel;
  logic            ck_mon, locked, seq_err;
  logic [7:0][4:0] c_main;
  logic [5:0]      c_octa;
  int checks = 0, failures = 0;
  int n_octa = 0, n_dn = 0, n_up = 0, n_seq_err = 0, n_lock = 0;
  realtime t_rise [8];

  octa_clk_src #(.PERIOD_PS(T)) u_src (.run(run), .ck(ck_in));
  oec_prototype1 dut (.rst_n(rst_n), .cal_en(cal_en), .ck_in(ck_in), .ck_out(ck_out),
    .mon_sel(mon_sel), .ck_mon(ck_mon), .c_main(c_main), .c_octa(c_octa),
    .locked(locked), .seq_err(seq_err));

  for (genvar k = 0; k < 8; k++) begin : g_m
    always @(posedge ck_out[k]) t_rise[k] = $realtime;
  end

  logic [7:0][4:0] c_prev;
  always @(posedge dut.ck1_div4) begin
    for (int k = 0; k < 8; k++) begin
      if (c_main[k] < c_prev[k]) n_dn++;
      if (c_main[k] > c_prev[k]) n_up++;
    end
    c_prev <= c_main;
  end
  always @(c_octa) if (rst_n) n_octa++;
  always @(posedge seq_err) begin
    n_seq_err++;
    $display("sequence error at %0.1f ns", $realtime / 1000.0);
  end
  always @(posedge locked) n_lock++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Worst deviation of neighbour spacing from T/8, from the latest rising edges.
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

  // Worst deviation of the 3-phase pair spacing (what the loop compares) from 3T/8.
  function automatic real pair_err();
    real worst = 0.0;
    for (int k = 0; k < 8; k++) begin
      real d = t_rise[(k + 3) % 8] - t_rise[k];
      while (d < 0.0) d += T;
      while (d >= T) d -= T;
      d = d - 3.0 * T / 8.0;
      if (d < 0.0) d = -d;
      if (d > worst) worst = d;
    end
    return worst;
  endfunction

  int mux_edges;
  always @(posedge dut.ck_mux0) mux_edges++;

  initial begin
    real e0, e1;
    int skew [8] = '{0, 4000, -3000, 2000, -5000, 1000, 3000, -2000};
    rst_n = 1; cal_en = 1; run = 1; mon_sel = 3'd5;
    #10 rst_n = 0; cal_en = 0;
    for (int k = 0; k < 8; k++) begin
      u_src.skew_fs[k] = skew[k];
      t_rise[k] = 0.0;
    end
    c_prev = '0;
    #2000;
    e0 = spacing_err();
    $display("initial worst spacing error %0.3f ps", e0);
    check(e0 > 4.0, "skews applied to the outputs");
    rst_n = 1;
    #1000 cal_en = 1;
    wait (locked);
    $display("locked at %0.1f ns, octa code %0d", $realtime / 1000.0, c_octa);
    #3000;
    e1 = spacing_err();
    $display("worst spacing error after lock %0.3f ps, pair error %0.3f ps", e1, pair_err());
    check(e1 < 1.0, "corrected neighbour spacing within 1 ps of T/8");
    check(pair_err() < 1.0, "corrected pair spacing within 1 ps of 3T/8");
    mux_edges = 0;
    #5000;
    check(mux_edges == 0, "calibration clocks gated after lock");
    @(posedge ck_out[5]);
    #1;
    check(ck_mon == 1'b1, "monitor MUX follows selected output");
    // Restart the loop with a new skew pattern.
    cal_en = 0;
    #1000;
    check(!locked, "lock cleared by cal_en low");
    for (int k = 0; k < 8; k++) u_src.skew_fs[k] = -skew[k] / 2;
    cal_en = 1;
    #1000;
    check(mux_edges > 0, "calibration clocks run again after restart");
    wait (locked);
    #3000;
    e1 = spacing_err();
    $display("worst spacing error after relock %0.3f ps, pair error %0.3f ps", e1, pair_err());
    check(e1 < 1.0, "corrected neighbour spacing after restart");
    check(pair_err() < 1.0, "corrected pair spacing after restart");
    $display("mechanisms: octa updates %0d, main decreases %0d, increases %0d, locks %0d, seq errors %0d",
             n_octa, n_dn, n_up, n_lock, n_seq_err);
    check(n_octa > 0, "octa code updated");
    check(n_dn > 0, "main codes decreased");
    check(n_up > 0, "main codes increased");
    check(n_lock == 2, "lock reached twice");
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
