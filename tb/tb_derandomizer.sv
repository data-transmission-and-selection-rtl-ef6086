// Testbench for derandomizer: records carry their cycle number; accepted
// events must come out as 36 consecutive words equal to the record presented
// L0_LATENCY cycles before the accept, with the event number in word 0.
// A burst of 20 consecutive accepts stores 16 and counts 4 overflows. Checks
// that each event takes 36 cycles (898 ns at 40.08 MHz, limit 900 ns).
module tb_derandomizer;
  import sb_pkg::*;
  localparam int NW = 36, NE = 16, LAT = 12;
  logic clk = 0, rst_n = 0, l0_accept = 0, clr = 0;
  logic [31:0] rec [NW];
  logic [31:0] tx_data;
  logic tx_dv, tx_first;
  logic [5:0] occupancy;
  logic [15:0] accept_cnt, overflow_cnt;
  int checks = 0, failures = 0, cyc = 0;
  int exp_cyc [$];     // record cycle of each expected event
  int exp_num [$];
  int ev_num = 0, widx = -1, cur_rec = 0, cur_num = 0, frame_start = 0, n_events_out = 0;
  int max_occ = 0;

  derandomizer #(.N_WORDS(NW), .N_EVENTS(NE), .L0_LATENCY(LAT)) dut (
    .clk, .rst_n, .rec, .l0_accept, .clr, .tx_data, .tx_dv, .tx_first,
    .occupancy, .accept_cnt, .overflow_cnt);

  always #12.475 clk = ~clk;

  function automatic logic [31:0] recw(input int c, input int w);
    return {16'(c), 8'(w), 8'h5A};
  endfunction

  // drive records and model the queue occupancy (events queued, incl. the one sent)
  int model_occ = 0;
  always @(negedge clk) for (int w = 0; w < NW; w++) rec[w] = recw(cyc, w);

  always @(posedge clk) if (rst_n) begin
    if (l0_accept) begin
      if (model_occ < NE) begin
        exp_cyc.push_back(cyc - LAT);
        exp_num.push_back(ev_num);
        model_occ++;
      end
      ev_num++;
    end
    if (occupancy > max_occ) max_occ = occupancy;
    if (tx_dv) begin
      if (tx_first) begin
        checks++;
        if (widx != -1) begin failures++; $display("frame restarted early"); end
        if (exp_cyc.size() == 0) begin failures++; $display("unexpected event"); end
        else begin
          cur_rec = exp_cyc.pop_front(); cur_num = exp_num.pop_front();
        end
        widx = 0; frame_start = cyc;
      end
      checks++;
      if (widx < 0) failures++;
      else if (widx == 0) begin
        logic [31:0] e;
        e = recw(cur_rec, 0);
        e[23:12] = 12'(cur_num);
        if (tx_data !== e) begin failures++; $display("hdr %h exp %h", tx_data, e); end
      end else if (tx_data !== recw(cur_rec, widx)) begin
        failures++; $display("word %0d: %h exp %h", widx, tx_data, recw(cur_rec, widx));
      end
      widx++;
      if (widx == NW) begin
        checks++;
        if (cyc - frame_start != NW - 1) begin failures++; $display("frame took %0d cycles", cyc - frame_start + 1); end
        checks++;
        if (real'(cyc - frame_start + 1) * 24.95 > 900.0) failures++;
        widx = -1; n_events_out++; model_occ--;
      end
    end else if (widx != -1) begin
      failures++; $display("gap inside a frame"); widx = -1;
    end
    cyc++;
  end

  task automatic accept_at(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk) l0_accept = 1;
    end
    @(negedge clk) l0_accept = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (LAT + 5) @(negedge clk);
    // sparse accepts
    for (int i = 0; i < 30; i++) begin
      accept_at(1);
      repeat ($urandom % 60) @(negedge clk);
    end
    wait (exp_cyc.size() == 0 && widx == -1);
    repeat (3) @(negedge clk);
    // burst of 20 consecutive accepts
    accept_at(20);
    wait (exp_cyc.size() == 0 && widx == -1 && occupancy == 0);
    repeat (3) @(negedge clk);
    checks++;
    if (overflow_cnt != 16'd4) begin failures++; $display("overflows %0d", overflow_cnt); end
    checks++;
    if (accept_cnt != 16'd46) begin failures++; $display("accepts %0d", accept_cnt); end
    checks++;
    if (max_occ != NE) begin failures++; $display("max occupancy %0d", max_occ); end
    checks++;
    if (n_events_out != 46) begin failures++; $display("events out %0d", n_events_out); end
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    checks++;
    if (overflow_cnt != 0 || accept_cnt != 0) failures++;
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
