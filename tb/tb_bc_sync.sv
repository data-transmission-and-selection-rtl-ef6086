// Testbench for bc_sync: the delayed BCRST comes delay+1 cycles after BCRST,
// starts the read-out and restarts the bunch counter, which wraps at 3564.
module tb_bc_sync;
  import sb_pkg::*;
  logic clk = 0, rst_n = 0, bcrst = 0;
  logic [11:0] delay = '0, bcid;
  logic bcrst_d, read_en;
  int checks = 0, failures = 0, cyc = 0, t_bcrst = 0;

  bc_sync dut (.clk, .rst_n, .bcrst, .delay, .bcrst_d, .read_en, .bcid);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at cycle %0d", msg, cyc); end
  endtask

  task automatic orbit_test(input int d);
    int seen;
    @(negedge clk) begin delay = 12'(d); bcrst = 1; end
    @(negedge clk) bcrst = 0;
    seen = 0;
    // bcrst sampled at one edge; bcrst_d visible after edge d+1
    for (int i = 1; i <= d + 3; i++) begin
      @(negedge clk);
      if (bcrst_d) begin
        check(i == d + 1, $sformatf("bcrst_d after %0d cycles, delay %0d", i, d));
        seen++;
      end
    end
    check(seen == 1, "one delayed pulse");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(read_en == 0, "read disabled before BCRST");
    orbit_test(0);
    check(read_en == 1, "read enabled after delayed BCRST");
    orbit_test(7);
    orbit_test(100);
    // bunch counter: after bcrst_d, counts 0..3563 and wraps
    @(negedge clk) begin delay = 12'd2; bcrst = 1; end
    @(negedge clk) bcrst = 0;
    wait (bcrst_d);
    @(posedge clk);
    @(negedge clk);
    check(bcid == 0, "bcid 0 after bcrst_d");
    for (int i = 1; i < BX_PER_ORBIT + 5; i++) begin
      @(negedge clk);
      check(bcid == 12'(i % BX_PER_ORBIT), $sformatf("bcid %0d", bcid));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
