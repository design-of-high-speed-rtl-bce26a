// tb_div4 - divide-by-4 check. A 10 ps clock drives the divider; after an
// asynchronous clear (applied at random points) the output must start low,
// rise on the second clock edge after clear release and then repeat every
// four input edges with two high and two low, compared cycle by cycle against
// a counter model.
module tb_div4;
  timeunit 1ps; timeprecision 1fs;

  logic ck = 1'b0, rst_n, ck_div4;
  int checks = 0, failures = 0, n_rise = 0;
  int cnt;

  div4 dut (.ck(ck), .rst_n(rst_n), .ck_div4(ck_div4));

  always #5 ck = ~ck;

  always @(posedge ck_div4) n_rise++;

  initial begin
    rst_n = 1'b1;
    #2 rst_n = 1'b0;
    for (int r = 0; r < 20; r++) begin
      #($urandom_range(1, 30));
      @(negedge ck) rst_n = 1'b0;
      #1;
      checks++;
      if (ck_div4 !== 1'b0) begin failures++; $display("FAIL: output not cleared"); end
      #($urandom_range(1, 4)) ;
      @(negedge ck) rst_n = 1'b1;
      cnt = 0;
      repeat (4 * $urandom_range(2, 6)) begin
        @(posedge ck) #1 cnt++;
        checks++;
        if (ck_div4 !== ((cnt % 4) == 2 || (cnt % 4) == 3)) begin
          failures++;
          $display("FAIL: edge %0d after release, out %b", cnt, ck_div4);
        end
      end
    end
    checks++;
    if (n_rise == 0) begin failures++; $display("FAIL: output never rose"); end
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
