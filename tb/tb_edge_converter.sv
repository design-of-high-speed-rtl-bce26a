// tb_edge_converter - edge converter model check. Two complementary 125 ps
// clocks with random duty errors drive ck_f and ck_r. A falling edge of ck_f
// must appear as a rising edge of out_f after T_R2R + 0.05 ps, a rising edge of
// ck_r as a rising edge of out_r after T_R2R, so the two output rising edges
// are separated by the duty error of ck_f plus the fixed 0.05 ps mismatch.
module tb_edge_converter;
  timeunit 1ps; timeprecision 1fs;

  logic ck_f = 1'b0, ck_r = 1'b0, out_f, out_r;
  realtime t_ff, t_rr, t_of, t_or;
  real err_ps;
  int checks = 0, failures = 0;

  edge_converter dut (.ck_f(ck_f), .ck_r(ck_r), .out_f(out_f), .out_r(out_r));

  always @(negedge ck_f) t_ff = $realtime;
  always @(posedge ck_r) t_rr = $realtime;

  always @(posedge out_f) begin
    automatic real d = $realtime - t_ff - 10.05;
    t_of = $realtime;
    checks++;
    if (d > 0.001 || d < -0.001) begin failures++; $display("FAIL: out_f delay error %0.4f", d); end
  end

  always @(posedge out_r) begin
    automatic real d = $realtime - t_rr - 10.0;
    t_or = $realtime;
    checks++;
    if (d > 0.001 || d < -0.001) begin failures++; $display("FAIL: out_r delay error %0.4f", d); end
  end

  initial begin
    #100;
    for (int n = 0; n < 200; n++) begin
      err_ps = real'(int'($urandom_range(0, 8000)) - 4000) / 1000.0;
      // ck_f: rises at 0, falls at 62.5 + err; ck_r rises at 62.5 and falls at 125.
      ck_f = 1'b1;
      #(30.0) ck_r = 1'b0;
      if (err_ps < 0.0) begin
        #(32.5 + err_ps) ck_f = 1'b0;
        #(-err_ps) ck_r = 1'b1;
        #(62.5);
      end else begin
        #(32.5) ck_r = 1'b1;
        #(err_ps) ck_f = 1'b0;
        #(62.5 - err_ps);
      end
      // Both output edges of this cycle have arrived (10 ps after the inputs).
      begin
        automatic real sep = (t_of - t_or) - (err_ps + 0.05);
        if (n > 0) checks++;  // the first cycle may start from an arbitrary output level
        if (n > 0 && (sep > 0.001 || sep < -0.001)) begin failures++; $display("FAIL: separation error %0.4f", sep); end
      end
    end
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
