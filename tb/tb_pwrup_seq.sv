// tb_pwrup_seq - power-up sequencer check. ck_mux1 runs at 20 ps, ck0_div4 is
// a divided clock changing 5 ps after a ck_mux1 rising edge. After reset en1
// must stay low until ck0_div4 has been high at one ck_mux1 edge, then rise
// exactly at the fifth ck_mux1 edge counted from that one, and stay high while
// ck0_div4 keeps toggling. Reset must clear it again. Repeated with random
// start offsets.
module tb_pwrup_seq;
  timeunit 1ps; timeprecision 1fs;

  logic ck = 1'b0, rst_n, d4, en1;
  int checks = 0, failures = 0, n_en = 0;

  pwrup_seq dut (.ck_mux1(ck), .rst_n(rst_n), .ck0_div4(d4), .en1(en1));

  always #10 ck = ~ck;
  always @(posedge en1) n_en++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    int edges;
    d4 = 1'b0;
    rst_n = 1'b1;
    #2 rst_n = 1'b0;
    for (int r = 0; r < 10; r++) begin
      rst_n = 1'b0;
      d4 = 1'b0;
      #1 check(en1 == 1'b0, "cleared by reset");
      @(posedge ck) #5 rst_n = 1'b1;
      repeat ($urandom_range(0, 5)) @(posedge ck);
      @(posedge ck) #5 d4 = 1'b1;
      // d4 toggles every two ck_mux1 periods from here (divide by 4).
      fork
        forever begin
          #40 d4 = ~d4;
        end
      join_none
      edges = 0;
      repeat (4) begin
        @(posedge ck) #1 edges++;
        check(en1 == 1'b0, "en1 low before fifth edge");
      end
      @(posedge ck) #1;
      check(en1 == 1'b1, "en1 high at fifth edge");
      repeat (20) begin
        @(posedge ck) #1;
        check(en1 == 1'b1, "en1 stays high");
      end
      disable fork;
    end
    check(n_en == 10, "one enable per power-up");
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
