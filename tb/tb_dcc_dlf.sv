// tb_dcc_dlf - duty-loop filter check at the default parameters (6-bit codes,
// one update per 8 valid words). Random words are applied with random valid;
// a reference model keeps the word count and the eight codes, which must match
// after every clock: on every 8th valid word each code k steps down when
// err[k] = 1 and up when err[k] = 0, saturating at 0 and 63. Long runs of ones
// and zeros drive codes into both limits.
module tb_dcc_dlf;
  timeunit 1ps; timeprecision 1fs;

  logic            clk = 1'b0, rst_n, valid;
  logic [7:0]      err;
  logic [7:0][5:0] c_duty, m_duty;
  int checks = 0, failures = 0, cnt = 0, n_upd = 0, n_lo = 0, n_hi = 0;

  dcc_dlf dut (.clk(clk), .rst_n(rst_n), .valid(valid), .err(err), .c_duty(c_duty));

  always #20 clk = ~clk;

  task automatic apply(input logic [7:0] e, input logic v);
    @(negedge clk);
    err = e;
    valid = v;
    if (v) begin
      if (cnt == 7) begin
        cnt = 0;
        n_upd++;
        for (int k = 0; k < 8; k++) begin
          if (e[k] && m_duty[k] != 0) m_duty[k]--;
          else if (!e[k] && m_duty[k] != 63) m_duty[k]++;
        end
      end else cnt++;
    end
    @(posedge clk) #1;
    checks++;
    if (c_duty !== m_duty) begin failures++; $display("FAIL: codes %h model %h", c_duty, m_duty); end
    for (int k = 0; k < 8; k++) begin
      if (c_duty[k] == 0) n_lo++;
      if (c_duty[k] == 63) n_hi++;
    end
  endtask

  initial begin
    rst_n = 1'b1; valid = 1'b0; err = '0;
    #3 rst_n = 1'b0;
    for (int k = 0; k < 8; k++) m_duty[k] = 6'd32;
    #5 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) apply(8'($urandom), 1'($urandom));
    for (int n = 0; n < 600; n++) apply(8'hF0, 1'b1);
    for (int n = 0; n < 1000; n++) apply(8'($urandom), 1'($urandom));
    checks++;
    if (n_upd == 0 || n_lo == 0 || n_hi == 0) begin failures++; $display("FAIL: updates or limits not reached"); end
    $display("updates %0d", n_upd);
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
