// Testbench for addr_lut: loads every table with values from an independent
// hash, then checks random parallel look-ups and ECS read-back, one cycle
// after the address.
module tb_addr_lut;
  import sb_pkg::*;
  localparam int N = 28;
  logic clk = 0, we = 0;
  logic [4:0] wch = '0, rb_ch = '0;
  logic [7:0] waddr = '0, rb_addr = '0;
  logic [13:0] wdata = '0, rb_data;
  logic [7:0] raddr [N];
  logic [13:0] rdata [N];
  int checks = 0, failures = 0;

  addr_lut #(.N_CH(N)) dut (.clk, .we, .wch, .waddr, .wdata, .raddr, .rdata, .rb_ch, .rb_addr, .rb_data);

  always #5 clk = ~clk;

  function automatic logic [13:0] h(input int c, input int a);
    return 14'((c * 7919 + a * 104729 + (a ^ (c << 3)) * 31) & 16'h3FFF);
  endfunction

  initial begin
    for (int c = 0; c < N; c++) raddr[c] = '0;
    for (int c = 0; c < N; c++)
      for (int a = 0; a < 256; a++) begin
        @(negedge clk) begin we = 1; wch = 5'(c); waddr = 8'(a); wdata = h(c, a); end
      end
    @(negedge clk) we = 0;
    for (int i = 0; i < 500; i++) begin
      logic [7:0] ra [N];
      int rc, rba;
      @(negedge clk);
      for (int c = 0; c < N; c++) begin ra[c] = 8'($urandom); raddr[c] = ra[c]; end
      rc = $urandom % N; rba = $urandom % 256;
      rb_ch = 5'(rc); rb_addr = 8'(rba);
      @(negedge clk);
      for (int c = 0; c < N; c++) begin
        checks++;
        if (rdata[c] !== h(c, int'(ra[c]))) begin failures++; $display("ch %0d addr %0d", c, ra[c]); end
      end
      checks++;
      if (rb_data !== h(rc, rba)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
