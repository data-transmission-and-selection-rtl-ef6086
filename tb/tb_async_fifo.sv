// Testbench for async_fifo: random writes and reads on two unrelated clocks;
// every accepted word must come out once and in order, full and empty must
// both be seen, and nothing is written while full.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wen = 0, ren = 0;
  logic [32:0] wdata = '0, rdata;
  logic full, empty, rvalid;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_wr = 0, n_rd = 0;
  logic [32:0] model [$];
  bit phase_fast = 1, stop = 0;

  async_fifo #(.WIDTH(33), .DEPTH(16)) dut (.wclk, .wrst_n, .wen, .wdata, .full,
    .rclk, .rrst_n, .ren, .rdata, .rvalid, .empty);

  always #6 wclk = ~wclk;
  always #13 rclk = ~rclk;

  always @(posedge wclk) if (wrst_n) begin
    if (wen && !full) begin model.push_back(wdata); n_wr++; end
    if (full) n_full++;
  end
  always @(negedge wclk) if (wrst_n) begin
    wen   <= stop ? 1'b0 : phase_fast ? ($urandom % 10 < 8) : ($urandom % 10 < 2);
    wdata <= 33'($urandom) ^ (33'($urandom) << 1);
  end

  always @(posedge rclk) if (rrst_n) begin
    if (empty) n_empty++;
    if (rvalid) begin
      checks++; n_rd++;
      if (model.size() == 0 || rdata !== model[0]) begin
        failures++;
        $display("read mismatch %h", rdata);
      end
      if (model.size() != 0) void'(model.pop_front());
    end
  end
  always @(negedge rclk) if (rrst_n) ren <= ($urandom % 10 < 6);

  initial begin
    repeat (4) @(posedge rclk);
    wrst_n = 1; rrst_n = 1;
    repeat (1500) @(posedge rclk);
    phase_fast = 0;
    repeat (1500) @(posedge rclk);
    @(negedge wclk) stop = 1;
    repeat (4) @(posedge rclk);
    wait (model.size() == 0);
    repeat (10) @(posedge rclk);
    checks++; if (n_full == 0)  begin failures++; $display("never full");  end
    checks++; if (n_empty == 0) begin failures++; $display("never empty"); end
    checks++; if (n_rd != n_wr) begin failures++; $display("wr %0d rd %0d", n_wr, n_rd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge rclk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
