// Testbench for trigger_process: an HCAL master and an ECAL board receive the
// same random candidates; the master also gets random slave results on its
// backplane inputs. Checks, 4 cycles after each input crossing, the L0DU words
// against a reference computed from an independent copy of the LUT contents,
// the backplane output after 2 cycles, and that the ECAL board ignores the
// backplane.
module tb_trigger_process;
  import sb_pkg::*;
  localparam int N = 28;
  localparam int HIST = 64;
  logic clk = 0, rst_n = 0;
  logic [31:0] in_word [N];
  logic in_valid = 0;
  logic [11:0] bcid = '0;
  logic lut_we = 0;
  logic [4:0] lut_ch = '0;
  logic [7:0] lut_addr = '0;
  logic [13:0] lut_wdata = '0, lut_rdata_m, lut_rdata_e;
  partial_t bp_out_m, bp_out_e, bp_in [N_SLAVES], seen_m [N_SLAVES], seen_e [N_SLAVES];
  logic [31:0] w0_m, w1_m, w0_e, w1_e;
  logic ov_m, ov_e;
  logic [11:0] ob_m, ob_e;
  int checks = 0, failures = 0, cyc = 0, n_slave_win = 0;

  trigger_process #(.ROLE(ROLE_HCAL_MASTER), .N_CH(N)) dut_m (
    .clk, .rst_n, .in_word, .in_valid, .bcid, .lut_we, .lut_ch, .lut_addr, .lut_wdata,
    .lut_rdata(lut_rdata_m), .bp_out(bp_out_m), .bp_in, .bp_seen(seen_m),
    .l0du_w0(w0_m), .l0du_w1(w1_m), .out_valid(ov_m), .out_bcid(ob_m));
  trigger_process #(.ROLE(ROLE_ELECTRON), .N_CH(N)) dut_e (
    .clk, .rst_n, .in_word, .in_valid, .bcid, .lut_we, .lut_ch, .lut_addr, .lut_wdata,
    .lut_rdata(lut_rdata_e), .bp_out(bp_out_e), .bp_in, .bp_seen(seen_e),
    .l0du_w0(w0_e), .l0du_w1(w1_e), .out_valid(ov_e), .out_bcid(ob_e));

  always #5 clk = ~clk;

  function automatic logic [13:0] lutv(input int c, input int a);
    return 14'((c * 613 + a * 37 + 5) & 16'h3FFF);
  endfunction

  // history of what was driven, by cycle
  logic [31:0] h_in [HIST][N];
  logic        h_v  [HIST];
  logic [11:0] h_b  [HIST];
  partial_t    h_bp [HIST][N_SLAVES];

  function automatic partial_t own(input int t);
    partial_t p;
    p = '0;
    for (int c = 0; c < N; c++) begin
      p.sum += 16'(h_in[t][c][7:0]);
      if (c == 0 || h_in[t][c][7:0] > p.et) begin
        p.et = h_in[t][c][7:0];
        p.addr = lutv(c, int'(h_in[t][c][15:8]));
      end
    end
    return p;
  endfunction

  always @(posedge clk) if (rst_n) begin
    int t0, t2;
    for (int c = 0; c < N; c++) h_in[cyc % HIST][c] = in_word[c];
    h_v[cyc % HIST] = in_valid;
    h_b[cyc % HIST] = bcid;
    h_bp[cyc % HIST] = bp_in;
    cyc++;
    // outputs now visible were computed from inputs of cycle cyc-1-4
    if (cyc > 8) begin
      partial_t p, f;
      t0 = (cyc - 5) % HIST;
      t2 = (cyc - 3) % HIST;
      checks++;
      if (ov_m !== h_v[t0] || ov_e !== h_v[t0]) failures++;
      if (h_v[t0]) begin
        p = own(t0);
        f = p;
        f.sum = p.sum + h_bp[t2][0].sum + h_bp[t2][1].sum;
        for (int s = 0; s < N_SLAVES; s++)
          if (h_bp[t2][s].et > f.et) begin f.et = h_bp[t2][s].et; f.addr = h_bp[t2][s].addr; n_slave_win++; end
        checks += 3;
        if (w0_m !== l0du_word0(h_b[t0], f) || w1_m !== l0du_word1(h_b[t0], f)) begin
          failures++; $display("master cyc %0d: %h %h exp %h %h", cyc, w0_m, w1_m, l0du_word0(h_b[t0], f), l0du_word1(h_b[t0], f));
        end
        if (w0_e !== l0du_word0(h_b[t0], p) || w1_e !== l0du_word1(h_b[t0], p)) begin
          failures++; $display("ecal cyc %0d", cyc);
        end
        if (ob_m !== h_b[t0]) failures++;
      end
      // backplane output: partial of cycle cyc-1-2
      if (h_v[(cyc - 3) % HIST]) begin
        checks++;
        if (bp_out_m !== own((cyc - 3) % HIST)) begin failures++; $display("bp_out cyc %0d", cyc); end
      end
    end
  end

  initial begin
    for (int c = 0; c < N; c++) in_word[c] = '0;
    bp_in[0] = '0; bp_in[1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < N; c++)
      for (int a = 0; a < 256; a++)
        @(negedge clk) begin lut_we = 1; lut_ch = 5'(c); lut_addr = 8'(a); lut_wdata = lutv(c, a); end
    @(negedge clk) lut_we = 0;
    // read-back of one entry
    lut_ch = 5'd3; lut_addr = 8'd77;
    @(negedge clk);
    checks++;
    if (lut_rdata_m !== lutv(3, 77)) failures++;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 8 != 0);
      bcid = bcid + 1'b1;
      for (int c = 0; c < N; c++) in_word[c] = $urandom & ((i % 4 == 0) ? 32'hFFFF_FF03 : 32'hFFFF_FFFF);
      bp_in[0] = partial_t'({$urandom, $urandom});
      bp_in[1] = partial_t'({$urandom, $urandom});
    end
    @(negedge clk) in_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (n_slave_win == 0) begin failures++; $display("slave candidate never won"); end
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
