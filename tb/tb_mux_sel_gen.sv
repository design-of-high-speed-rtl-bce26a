// tb_mux_sel_gen - selection-code generator check. After reset the index must
// count 7, 6, ..., 0 and wrap to 7, one step per divided clock edge. The
// select code must make an 8:1 multiplexer pass phase idx (sel[4] = idx[0]),
// while the idle path already points to phase idx-1, the next one in the
// backward rotation, so that changing sel[4] alone switches to it.
module tb_mux_sel_gen;
  import occ_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic       clk = 1'b0, rst_n;
  ph_idx_t    idx, exp_idx;
  logic [4:0] sel;
  int checks = 0, failures = 0, n_wrap = 0;

  mux_sel_gen dut (.clk_div4(clk), .rst_n(rst_n), .idx(idx), .sel(sel));

  always #20 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (idx %0d sel %b)", what, idx, sel); end
  endtask

  initial begin
    int cur, other;
    rst_n = 1'b1;
    #3 rst_n = 1'b0;
    #1 check(idx == 3'd7, "reset index 7");
    @(negedge clk) rst_n = 1'b1;
    exp_idx = 3'd7;
    repeat (40) begin
      @(posedge clk) #1;
      exp_idx = exp_idx - 3'd1;
      if (exp_idx == 3'd7) n_wrap++;
      check(idx == exp_idx, "backward rotation");
      check(sel[4] == idx[0], "path select is index LSB");
      cur   = sel[4] ? 2 * int'(sel[3:2]) + 1 : 2 * int'(sel[1:0]);
      other = sel[4] ? 2 * int'(sel[1:0]) : 2 * int'(sel[3:2]) + 1;
      check(cur == int'(idx), "selected phase is idx");
      check(other == int'(ph_idx_t'(idx - 3'd1)), "idle path holds idx-1");
    end
    check(n_wrap > 0, "index wrapped from 0 to 7");
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
