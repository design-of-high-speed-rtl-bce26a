// tb_bbpd_des - deserializer check with two lanes (the configuration of the
// phase-and-duty corrector). The testbench plays the selection logic: every
// clock it presents the next index of the backward rotation 7..0 with
// sel4 = idx[0], and one clock later the random detector bits of that slot.
// Each completed round must produce one valid word whose bit i is the bit of
// slot i, for every lane. Then rounds with a skipped index or a wrong sel4 are
// injected: they must raise seq_err and produce no word.
module tb_bbpd_des;
  import occ_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic                ck = 1'b0, rst_n, sel4, valid, seq_err;
  ph_idx_t             idx;
  logic [1:0]          din;
  logic [1:0][7:0]     word, exp_word [$];
  int checks = 0, failures = 0, n_words = 0, n_err = 0;

  bbpd_des #(.LANES(2)) dut (.ck(ck), .rst_n(rst_n), .din(din), .idx(idx), .sel4(sel4),
    .word(word), .valid(valid), .seq_err(seq_err));

  always #20 ck = ~ck;

  always @(posedge ck) begin
    #1;
    if (valid) begin
      n_words++;
      checks++;
      if (exp_word.size() == 0) begin
        failures++;
        $display("FAIL: unexpected word");
      end else if (word !== exp_word.pop_front()) begin
        failures++;
        $display("FAIL: word %h", word);
      end
    end
    if (seq_err) n_err++;
  end

  logic [1:0] pend;  // bits of the slot presented one clock ago

  // One round; bad = 1 skips index 4, bad = 2 flips sel4 in slot 2.
  task automatic round(input int bad);
    logic [1:0][7:0] w;
    w = {8'($urandom), 8'($urandom)};
    for (int s = 7; s >= 0; s--) begin
      if (bad == 1 && s == 4) continue;
      @(negedge ck);
      idx  = ph_idx_t'(s);
      sel4 = (bad == 2 && s == 2) ? ~idx[0] : idx[0];
      din  = pend;
      pend = {w[1][s], w[0][s]};
    end
    if (bad == 0) exp_word.push_back(w);
  endtask

  initial begin
    rst_n = 1'b1;
    idx = 3'd7; sel4 = 1'b1; din = '0; pend = '0;
    #3 rst_n = 1'b0;
    #5 rst_n = 1'b1;
    for (int r = 0; r < 40; r++) round(0);
    checks++;
    if (n_words != 39 || n_err != 0) begin
      failures++;
      $display("FAIL: %0d words, %0d errors after 40 good rounds (last one still open)", n_words, n_err);
    end
    round(1);
    round(0);
    round(2);
    round(0);
    round(0);
    @(negedge ck);  // deliver the last slot's bits
    idx = 3'd7; sel4 = 1'b1; din = pend;
    repeat (3) @(posedge ck);
    checks++;
    if (n_err != 2) begin failures++; $display("FAIL: %0d sequence errors, expected 2", n_err); end
    checks++;
    if (exp_word.size() != 0) begin failures++; $display("FAIL: words missing"); end
    $display("words %0d, sequence errors %0d", n_words, n_err);
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
