// tb_oec_max_skew - workload test of the phase-only corrector at its default
// parameters: the largest input phase errors it is meant to correct. The
// published chip corrects an input phase error of up to 11.8 ps at 8 GHz;
// with 32 main-code steps of 0.5 ps, one phase can be moved 15.5 ps against
// the others. Four cases, each from reset:
//   1. CK3 late by 11.8 ps,   2. CK5 early by 11.8 ps,
//   3. CK0 late and CK4 early by 5.9 ps each (11.8 ps between them),
//   4. a mixed pattern of errors up to 6 ps.
// In each case the loop must lock within 10 us and every neighbour spacing of
// the corrected clocks must then be T/8 within 1 ps (two main-code steps:
// the loop is frozen at lock, possibly at the edge of its dither).
module tb_oec_max_skew;
  timeunit 1ps; timeprecision 1fs;

  localparam real T = 125.0;

  logic            rst_n, cal_en, run;
  logic [7:0]      ck_in, ck_out;
  logic [2:0]      mon_sel;
  logic            ck_mon, locked, seq_err;
  logic [7:0][4:0] c_main;
  logic [5:0]      c_octa;
  int checks = 0, failures = 0, n_lock = 0, n_seq_err = 0;
  realtime t_rise [8];

  octa_clk_src #(.PERIOD_PS(T)) u_src (.run(run), .ck(ck_in));
  oec_prototype1 dut (.rst_n(rst_n), .cal_en(cal_en), .ck_in(ck_in), .ck_out(ck_out),
    .mon_sel(mon_sel), .ck_mon(ck_mon), .c_main(c_main), .c_octa(c_octa),
    .locked(locked), .seq_err(seq_err));

  for (genvar k = 0; k < 8; k++) begin : g_m
    always @(posedge ck_out[k]) t_rise[k] = $realtime;
  end
  always @(posedge locked) n_lock++;
  always @(posedge seq_err) n_seq_err++;

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

  task automatic run_case(input string name, input int skew [8]);
    realtime t0;
    rst_n = 1'b0;
    cal_en = 1'b0;
    for (int k = 0; k < 8; k++) u_src.skew_fs[k] = skew[k];
    #2000;
    $display("%s: input spacing error %0.3f ps", name, spacing_err());
    rst_n = 1'b1;
    #1000 cal_en = 1'b1;
    t0 = $realtime;
    fork
      wait (locked);
      #(10.0e6);
    join_any
    disable fork;
    #2000;
    $display("%s: locked %b after %0.2f us, spacing error %0.3f ps, codes %p, octa %0d",
             name, locked, ($realtime - t0) / 1.0e6, spacing_err(), c_main, c_octa);
    check(locked === 1'b1, {name, ": lock"});
    check(spacing_err() < 1.001, {name, ": spacing within 1 ps (two main steps) of T/8"});
  endtask

  initial begin
    int c1 [8] = '{0, 0, 0, 11800, 0, 0, 0, 0};
    int c2 [8] = '{0, 0, 0, 0, 0, -11800, 0, 0};
    int c3 [8] = '{5900, 0, 0, 0, -5900, 0, 0, 0};
    int c4 [8] = '{-6000, 4000, 6000, -2000, 3000, -5000, 1000, -4000};
    rst_n = 1'b1; cal_en = 1'b1; run = 1'b1; mon_sel = 3'd0;
    #10 rst_n = 1'b0; cal_en = 1'b0;
    for (int k = 0; k < 8; k++) t_rise[k] = 0.0;
    run_case("CK3 late 11.8 ps", c1);
    run_case("CK5 early 11.8 ps", c2);
    run_case("CK0/CK4 +-5.9 ps", c3);
    run_case("mixed up to 6 ps", c4);
    check(n_lock == 4, "one lock per case");
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
