// Testbench for input_channel: a deserializer model sends one 32 bit word per
// 40 MHz period as two halves on an 80 MHz recovered clock with an arbitrary
// phase; once read_en is on, the channel must give one word per cycle in
// order. Checks the er counter, the framing fault counter, the underflow
// counter (read_en raised before any data arrived) and the overflow counter
// (link running with read_en low until the FIFO is full).
module tb_input_channel;
  import sb_pkg::*;
  logic clk = 0, rx_clk = 0, rst_n = 0, read_en = 0, clr = 0;
  logic [15:0] rx_data = '0;
  logic rx_dv = 0, rx_er = 0;
  logic [31:0] word_q;
  logic err_q, valid_q;
  logic [15:0] err_cnt, align_cnt, overflow_cnt, underflow_cnt;
  int checks = 0, failures = 0, n_err_sent = 0, n_words = 0, lost;
  logic [32:0] sent [$];
  bit sending = 0, inject_align = 0;

  input_channel dut (.rx_clk, .rx_data, .rx_dv, .rx_er, .clk, .rst_n, .read_en, .clr,
                     .word_q, .err_q, .valid_q, .err_cnt, .align_cnt, .overflow_cnt,
                     .underflow_cnt);

  always #12.5 clk = ~clk;
  initial begin #3.1; forever #6.25 rx_clk = ~rx_clk; end

  // deserializer model: low half, then high half
  bit half = 0;
  logic [31:0] cur;
  logic cur_e;
  always @(negedge rx_clk) begin
    if (!sending) begin
      rx_dv <= 0; rx_er <= 0; half <= 0;
    end else if (!half) begin
      cur = $urandom;
      cur_e = ($urandom % 13 == 0);
      rx_data <= cur[15:0]; rx_dv <= 1; rx_er <= cur_e; half <= 1;
    end else begin
      rx_data <= cur[31:16]; rx_dv <= 1; rx_er <= 0; half <= 0;
      sent.push_back({cur_e, cur});
      if (cur_e) n_err_sent++;
    end
  end

  always @(posedge clk) if (rst_n && valid_q) begin
    checks++; n_words++;
    if (sent.size() == 0 || {err_q, word_q} !== sent[0]) begin
      failures++;
      $display("mismatch %b %h", err_q, word_q);
    end
    if (sent.size() != 0) void'(sent.pop_front());
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    // read too early: underflows
    @(negedge clk) read_en = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) read_en = 0;
    check(underflow_cnt == 3, $sformatf("underflow count %0d", underflow_cnt));
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    check(underflow_cnt == 0, "clear");
    @(negedge rx_clk) sending = 1;
    repeat (6) @(posedge clk);
    @(negedge clk) read_en = 1;
    repeat (500) @(posedge clk);
    // every cycle gives a word
    check(underflow_cnt == 0, $sformatf("no underflow while running, got %0d", underflow_cnt));
    check(n_words > 490, $sformatf("one word per cycle, got %0d", n_words));
    check(overflow_cnt == 0, $sformatf("no overflow while running, got %0d", overflow_cnt));
    @(negedge clk) read_en = 0;
    repeat (2) @(posedge clk);
    check(n_err_read > 0 && err_cnt == 16'(n_err_read),
          $sformatf("er counter %0d, flagged words read %0d", err_cnt, n_err_read));
    // framing fault: stop the link in the middle of a word
    wait (half == 1);
    @(negedge rx_clk); sending = 0;
    repeat (10) @(posedge clk);
    check(align_cnt == 1, $sformatf("framing faults %0d", align_cnt));
    // overflow: the link runs on with nobody reading; every word beyond the
    // FIFO depth is lost and counted
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    @(negedge rx_clk) sending = 1;
    repeat (60) @(posedge clk);
    wait (half == 0);
    @(negedge rx_clk) sending = 0;
    repeat (10) @(posedge clk);
    lost = sent.size() - 16;
    check(lost > 30 && (int'(overflow_cnt) - lost) inside {[-1:1]},
          $sformatf("overflows %0d, words lost %0d", overflow_cnt, lost));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // exact er count: count flags seen on read words
  int n_err_read = 0;
  always @(posedge clk) if (rst_n && valid_q && err_q) n_err_read++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
