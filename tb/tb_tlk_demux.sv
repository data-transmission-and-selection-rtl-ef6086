// Testbench for tlk_demux: pairs of half-words become one word, er on either
// half flags the word, an idle between the halves is a framing fault.
module tb_tlk_demux;
  import sb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] d = '0;
  logic dv = 0, er = 0;
  logic [31:0] word;
  logic werr, wvalid, aerr;
  int checks = 0, failures = 0, n_align = 0;
  logic [31:0] exp_w [$];
  logic        exp_e [$];

  tlk_demux dut (.rx_clk(clk), .rx_rst_n(rst_n), .rx_data(d), .rx_dv(dv), .rx_er(er),
                 .word, .word_err(werr), .word_valid(wvalid), .align_err(aerr));

  always #5 clk = ~clk;

  task automatic send(input logic [31:0] w, input logic elo, input logic ehi);
    @(negedge clk) begin d = w[15:0];  dv = 1; er = elo; end
    @(negedge clk) begin d = w[31:16]; dv = 1; er = ehi; end
    exp_w.push_back(w); exp_e.push_back(elo | ehi);
  endtask
  task automatic idle();
    @(negedge clk) begin dv = 0; er = 0; d = 16'hBCBC; end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (wvalid) begin
      checks++;
      if (exp_w.size() == 0) failures++;
      else begin
        if (word !== exp_w[0] || werr !== exp_e[0]) begin
          failures++;
          $display("mismatch: got %h/%b exp %h/%b", word, werr, exp_w[0], exp_e[0]);
        end
        void'(exp_w.pop_front()); void'(exp_e.pop_front());
      end
    end
    if (aerr) n_align++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    idle();
    for (int i = 0; i < 200; i++) begin
      send($urandom, ($urandom % 17) == 0, ($urandom % 19) == 0);
      if ($urandom % 5 == 0) idle();
    end
    // broken word: low half then idle
    @(negedge clk) begin d = 16'h1234; dv = 1; er = 0; end
    idle();
    send(32'hCAFE_F00D, 0, 0);
    send(32'h0BAD_BEEF, 0, 1);
    repeat (4) idle();
    checks++;
    if (exp_w.size() != 0) begin failures++; $display("words lost: %0d", exp_w.size()); end
    checks++;
    if (n_align != 1) begin failures++; $display("align faults %0d, expected 1", n_align); end
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
