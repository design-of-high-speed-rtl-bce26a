// tb_clock_control_cell - clock control cell model check at its default
// parameters (6-bit delay code at 250 fs, 6-bit duty code at 0.325 ps).
// For random code pairs a 125 ps clock is applied. The rising edge must be
// delayed by BASE + c_dly * 0.25 ps and the falling edge additionally by
// (c_duty - 32) * 0.325 ps, so the high time grows by exactly that amount
// while the rising edge does not depend on the duty code.
module tb_clock_control_cell;
  timeunit 1ps; timeprecision 1fs;

  localparam real BASE = 20.0;

  logic       ck = 1'b0, ck_out;
  logic [5:0] c_dly, c_duty;
  realtime    t_in_r, t_in_f, t_out_r;
  int checks = 0, failures = 0, n_wide = 0, n_narrow = 0;

  clock_control_cell dut (.ck_in(ck), .c_dly(c_dly), .c_duty(c_duty), .ck_out(ck_out));

  always @(posedge ck) t_in_r = $realtime;
  always @(negedge ck) t_in_f = $realtime;

  always @(posedge ck_out) begin
    automatic real d = $realtime - t_in_r - (BASE + 0.25 * real'(c_dly));
    t_out_r = $realtime;
    checks++;
    if (d > 0.001 || d < -0.001) begin
      failures++;
      $display("FAIL: rising delay error %0.4f ps (dly %0d duty %0d)", d, c_dly, c_duty);
    end
  end

  always @(negedge ck_out) begin
    automatic real ext = 0.325 * real'(int'(c_duty) - 32);
    automatic real d = $realtime - t_in_f - (BASE + 0.25 * real'(c_dly) + ext);
    automatic real hi = ($realtime - t_out_r) - (62.5 + ext);
    checks++;
    if (d > 0.001 || d < -0.001 || hi > 0.001 || hi < -0.001) begin
      failures++;
      $display("FAIL: falling delay error %0.4f ps, high-time error %0.4f ps", d, hi);
    end
    if (ext > 0.0) n_wide++;
    if (ext < 0.0) n_narrow++;
  end

  initial begin
    #100;
    for (int n = 0; n < 300; n++) begin
      c_dly  = 6'($urandom);
      c_duty = 6'($urandom);
      #(5.0) ck = 1'b1;
      #(62.5) ck = 1'b0;
      #(57.5);
    end
    checks++;
    if (n_wide == 0 || n_narrow == 0) begin failures++; $display("FAIL: duty not moved both ways"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1.0e6);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
