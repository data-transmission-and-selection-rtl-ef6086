// Testbench for et_sum: random and extreme energies against a plain sum.
module tb_et_sum;
  import sb_pkg::*;
  localparam int N = 28;
  logic [7:0]  et [N];
  logic [15:0] sum;
  int checks = 0, failures = 0;

  et_sum #(.N(N)) dut (.et, .sum);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int s;
      s = 0;
      for (int c = 0; c < N; c++) begin
        et[c] = (i == 0) ? 8'hFF : (i == 1) ? 8'h00 : 8'($urandom);
        s += et[c];
      end
      #1;
      checks++;
      if (sum != 16'(s)) begin failures++; $display("got %0d exp %0d", sum, s); end
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
