// Testbench for max_select: random energies with many ties; the result must
// be the largest energy, from the lowest channel holding it.
module tb_max_select;
  import sb_pkg::*;
  localparam int N = 28;
  logic [7:0]  et [N];
  logic [13:0] addr [N];
  logic [7:0]  max_et;
  logic [13:0] max_addr;
  logic [4:0]  max_ch;
  int checks = 0, failures = 0;

  max_select #(.N(N)) dut (.et, .addr, .max_et, .max_addr, .max_ch);

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int best, bi;
      int range;
      range = (i % 3 == 0) ? 4 : 256;
      for (int c = 0; c < N; c++) begin
        et[c] = 8'($urandom % range);
        addr[c] = 14'($urandom);
      end
      if (i == 0) for (int c = 0; c < N; c++) et[c] = '0;
      if (i == 1) et[N-1] = 8'hFF;
      #1;
      best = -1; bi = 0;
      for (int c = 0; c < N; c++) if (int'(et[c]) > best) begin best = et[c]; bi = c; end
      checks++;
      if (max_et != 8'(best) || max_ch != 5'(bi) || max_addr != addr[bi]) begin
        failures++;
        $display("got %0d ch %0d exp %0d ch %0d", max_et, max_ch, best, bi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
