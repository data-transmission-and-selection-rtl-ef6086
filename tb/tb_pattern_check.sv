// Testbench for pattern_check: sends counter, pseudo-random and fixed
// sequences with known injected bit errors, and checks the word, wrong-word
// and wrong-bit counts. A corrupted word must be counted once only.
module tb_pattern_check;
  import sb_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0, din_valid = 0;
  pat_mode_e mode = PAT_FIXED;
  logic [31:0] fixed = '0, din = '0;
  logic locked;
  logic [47:0] word_cnt;
  logic [31:0] word_err_cnt, bit_err_cnt;
  int checks = 0, failures = 0;

  pattern_check dut (.clk, .rst_n, .enable, .mode, .fixed, .din, .din_valid, .locked,
                     .word_cnt, .word_err_cnt, .bit_err_cnt);
  always #5 clk = ~clk;

  task automatic run(input pat_mode_e m, input logic [31:0] start, input int n);
    logic [31:0] w, flip;
    int nw, nbe, nwe;
    nw = 0; nbe = 0; nwe = 0;
    @(negedge clk) begin mode = m; fixed = start; enable = 1; din_valid = 0; end
    w = start;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      din_valid = ($urandom % 4 != 0);
      flip = '0;
      if (i > 0 && din_valid && $urandom % 10 == 0) flip = 32'($urandom) & 32'h0101_0301;
      din = w ^ flip;
      if (din_valid) begin
        nw++;
        if (flip != 0) begin nwe++; nbe += $countones(flip); end
        w = pat_next(m, w, start);
      end
    end
    @(negedge clk) din_valid = 0;
    @(negedge clk);
    checks += 3;
    if (word_cnt != 48'(nw)) begin failures++; $display("mode %0d words %0d exp %0d", m, word_cnt, nw); end
    if (word_err_cnt != 32'(nwe)) begin failures++; $display("mode %0d werr %0d exp %0d", m, word_err_cnt, nwe); end
    if (bit_err_cnt != 32'(nbe)) begin failures++; $display("mode %0d berr %0d exp %0d", m, bit_err_cnt, nbe); end
    checks++;
    if (!locked) failures++;
    enable = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(PAT_COUNT, 32'h0000_0100, 1000);
    run(PAT_PRBS, 32'hBEEF_1234, 1000);
    run(PAT_FIXED, 32'h5555_AAAA, 500);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
