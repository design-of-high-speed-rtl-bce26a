// tb_mux8_5b - 8:1 clock multiplexer check. Random eight-phase input words and
// random 5-bit select codes are applied; the output must equal the phase
// chosen by the code: sel[4] picks the odd path (phase 2*sel[3:2]+1) or the
// even path (phase 2*sel[1:0]). Every one of the eight phases must be
// selected at least once.
module tb_mux8_5b;
  timeunit 1ps; timeprecision 1fs;

  logic [7:0] ck;
  logic [4:0] sel;
  logic       ck_out;
  int checks = 0, failures = 0;
  int hits [8];

  mux8_5b dut (.ck(ck), .sel(sel), .ck_out(ck_out));

  initial begin
    int p;
    for (int k = 0; k < 8; k++) hits[k] = 0;
    for (int n = 0; n < 2000; n++) begin
      ck  = 8'($urandom);
      sel = 5'($urandom);
      #1;
      p = sel[4] ? 2 * int'(sel[3:2]) + 1 : 2 * int'(sel[1:0]);
      hits[p]++;
      checks++;
      if (ck_out !== ck[p]) begin
        failures++;
        $display("FAIL: sel %b ck %b out %b", sel, ck, ck_out);
      end
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (hits[k] == 0) begin failures++; $display("FAIL: phase %0d never selected", k); end
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
