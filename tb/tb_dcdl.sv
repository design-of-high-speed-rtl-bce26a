// tb_dcdl - delay-line model check at its default parameters (5-bit code,
// 500 fs step). For random codes a 125 ps clock is applied; every rising and
// falling output edge must follow its input edge by BASE_PS + code * LSB_PS
// within 1 fs, and the output duty cycle must be unchanged. All 32 codes are
// exercised, including 0 and 31.
module tb_dcdl;
  timeunit 1ps; timeprecision 1fs;

  localparam real BASE = 20.0, LSB = 0.5;

  logic       ck = 1'b0, ck_out;
  logic [4:0] code;
  realtime    t_in_r, t_in_f;
  int checks = 0, failures = 0, n_codes = 0, n_in = 0, n_out = 0;
  bit seen [32];

  dcdl dut (.ck_in(ck), .code(code), .ck_out(ck_out));

  always @(posedge ck) begin t_in_r = $realtime; n_in++; end
  always @(negedge ck) t_in_f = $realtime;

  always @(posedge ck_out) if ($realtime > 100.0) n_out++;

  always @(ck_out) begin
    automatic real d = (ck_out ? $realtime - t_in_r : $realtime - t_in_f) - (BASE + LSB * real'(code));
    if ($realtime > 100.0) checks++;
    if ($realtime > 100.0 && (d > 0.001 || d < -0.001)) begin
      failures++;
      $display("FAIL: code %0d edge %b delay error %0.4f ps", code, ck_out, d);
    end
  end

  initial begin
    for (int c = 0; c < 32; c++) seen[c] = 1'b0;
    ck = 1'b0;
    code = 5'd0;
    #100;
    for (int n = 0; n < 200; n++) begin
      code = (n < 32) ? 5'(n) : 5'($urandom);
      if (!seen[code]) n_codes++;
      seen[code] = 1'b1;
      #(10.0) ck = 1'b1;
      #(62.5) ck = 1'b0;
      #(52.5);
    end
    checks++;
    if (n_out != n_in) begin failures++; $display("FAIL: %0d input and %0d output rising edges", n_in, n_out); end
    checks++;
    if (n_codes != 32) begin failures++; $display("FAIL: not all codes exercised"); end
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
