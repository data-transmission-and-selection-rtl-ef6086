// Testbench for pattern_gen: fixed, counter and pseudo-random modes against a
// bit-serial model of the LFSR (feedback taps at bits 31, 21, 1 and 0 after
// the shift).
module tb_pattern_gen;
  import sb_pkg::*;
  logic clk = 0, rst_n = 0, enable = 0;
  pat_mode_e mode = PAT_FIXED;
  logic [31:0] seed = '0, word;
  logic valid;
  int checks = 0, failures = 0;

  pattern_gen dut (.clk, .rst_n, .enable, .mode, .seed, .word, .valid);
  always #5 clk = ~clk;

  function automatic logic [31:0] lfsr_model(input logic [31:0] s);
    logic [31:0] r;
    logic fb;
    fb = s[0];
    for (int i = 0; i < 31; i++) r[i] = s[i+1];
    r[31] = fb;
    if (fb) begin r[21] = ~r[21]; r[1] = ~r[1]; r[0] = ~r[0]; end
    return r;
  endfunction

  task automatic run(input pat_mode_e m, input logic [31:0] sd, input int n);
    logic [31:0] e;
    @(negedge clk) begin mode = m; seed = sd; enable = 1; end
    @(negedge clk);
    e = (m == PAT_PRBS && sd == 0) ? 32'd1 : sd;
    for (int i = 0; i < n; i++) begin
      checks++;
      if (!valid || word !== e) begin failures++; $display("mode %0d i %0d: %h exp %h", m, i, word, e); end
      e = (m == PAT_FIXED) ? sd : (m == PAT_COUNT) ? e + 1 : lfsr_model(e);
      @(negedge clk);
    end
    enable = 0;
    @(negedge clk);
    checks++;
    if (valid) failures++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(PAT_FIXED, 32'hA5A5_0FF0, 50);
    run(PAT_COUNT, 32'hFFFF_FFF0, 50);
    run(PAT_PRBS, 32'h1234_5678, 500);
    run(PAT_PRBS, 32'h0, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
