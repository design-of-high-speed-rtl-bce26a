// tb_clk_gate - glitch-free clock gate check. A 20 ps clock is gated by an
// enable that changes at random times, also while the clock is high. Every
// output pulse must be a complete input pulse (10 ps wide), and a pulse is
// passed exactly when the enable was high at the preceding falling clock edge.
// Both passed and blocked pulses must occur.
module tb_clk_gate;
  timeunit 1ps; timeprecision 1fs;

  logic ck = 1'b0, en = 1'b0, ck_g;
  logic en_at_fall = 1'b0;
  bit   started = 1'b0;  // the gate's latch holds an arbitrary value until the first falling edge
  realtime t_r = 0.0;
  int checks = 0, failures = 0, n_pass = 0, n_block = 0;

  clk_gate dut (.ck(ck), .en(en), .ck_g(ck_g));

  always #10 ck = ~ck;

  always @(negedge ck) begin
    en_at_fall = en;
    started = 1'b1;
  end

  always @(posedge ck) begin
    #1;
    if (started) begin
      checks++;
      if (ck_g !== en_at_fall) begin
        failures++;
        $display("FAIL: pulse pass %b expected %b at %0t", ck_g, en_at_fall, $time);
      end
      if (en_at_fall) n_pass++; else n_block++;
    end
  end

  always @(posedge ck_g) t_r = $realtime;
  always @(negedge ck_g) begin
    if (started && t_r > 0.0) checks++;
    if (started && t_r > 0.0 && ($realtime - t_r < 9.999 || $realtime - t_r > 10.001)) begin
      failures++;
      $display("FAIL: output pulse width %0.3f", $realtime - t_r);
    end
  end

  initial begin
    @(negedge ck);
    repeat (1000) begin
      #($urandom_range(1, 60) + 0.5) en = 1'($urandom);
    end
    checks++;
    if (n_pass == 0 || n_block == 0) begin failures++; $display("FAIL: gating not exercised"); end
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
