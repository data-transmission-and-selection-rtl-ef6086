// Testbench for snapshot_fifo: after arm, the first 256 valid words are kept
// (later ones are not), and pops return them in order; re-arming empties it.
module tb_snapshot_fifo;
  logic clk = 0, rst_n = 0, arm = 0, din_valid = 0, pop = 0;
  logic [31:0] din = '0, dout;
  logic [8:0] count;
  logic recording;
  int checks = 0, failures = 0;
  logic [31:0] kept [$];

  snapshot_fifo #(.WIDTH(32), .DEPTH(256)) dut (.clk, .rst_n, .arm, .din, .din_valid, .pop,
                                                .dout, .count, .recording);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(count == 0 && !recording, "idle after reset");
    // words before arm are ignored
    din_valid = 1; din = 32'hDEAD_0000;
    @(negedge clk);
    check(count == 0, "no recording before arm");
    arm = 1; din_valid = 0;
    @(negedge clk) arm = 0;
    check(recording, "recording after arm");
    for (int i = 0; i < 400; i++) begin
      din = $urandom; din_valid = ($urandom % 3 != 0);
      if (din_valid && kept.size() < 256) kept.push_back(din);
      @(negedge clk);
    end
    din_valid = 0;
    check(count == 256, $sformatf("count %0d", count));
    check(!recording, "stopped when full");
    for (int i = 0; i < 256; i++) begin
      pop = 1;
      @(negedge clk);
      pop = 0;
      check(dout == kept[i], $sformatf("word %0d %h exp %h", i, dout, kept[i]));
      if ($urandom % 2) @(negedge clk);
    end
    check(count == 0, "empty after pops");
    pop = 1;
    @(negedge clk) pop = 0;
    check(count == 0, "pop on empty");
    arm = 1;
    @(negedge clk) arm = 0;
    din_valid = 1; din = 32'h1;
    @(negedge clk) din_valid = 0;
    check(count == 1, "re-armed");
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
