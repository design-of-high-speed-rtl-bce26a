// tb_bbpd - bang-bang phase detector check. Each trial raises i1 and i2 with a
// random offset between -2 ps and +2 ps (never zero) and then samples with
// ck_smp 20 ps later. phase_err must be 1 exactly when i1 rose after i2, and it
// must hold between trials until the next sample. Both decisions must occur.
module tb_bbpd;
  timeunit 1ps; timeprecision 1fs;

  logic i1 = 1'b0, i2 = 1'b0, ck_smp = 1'b0, rst_n, phase_err;
  int checks = 0, failures = 0, n_late = 0, n_early = 0;

  bbpd dut (.i1(i1), .i2(i2), .ck_smp(ck_smp), .rst_n(rst_n), .phase_err(phase_err));

  initial begin
    int off_fs;
    bit exp;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    #50;
    for (int n = 0; n < 500; n++) begin
      do off_fs = int'($urandom_range(0, 4000)) - 2000; while (off_fs == 0);
      exp = off_fs > 0;  // i1 after i2
      if (exp) begin
        i2 = 1'b1;
        #(real'(off_fs) / 1000.0) i1 = 1'b1;
      end else begin
        i1 = 1'b1;
        #(real'(-off_fs) / 1000.0) i2 = 1'b1;
      end
      #20 ck_smp = 1'b1;
      #1;
      checks++;
      if (phase_err !== exp) begin
        failures++;
        $display("FAIL: offset %0d fs gave %b", off_fs, phase_err);
      end
      if (exp) n_late++; else n_early++;
      #20 i1 = 1'b0; i2 = 1'b0; ck_smp = 1'b0;
      #20;
      checks++;
      if (phase_err !== exp) begin failures++; $display("FAIL: decision not held"); end
    end
    checks++;
    if (n_late == 0 || n_early == 0) begin failures++; $display("FAIL: one decision never made"); end
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
