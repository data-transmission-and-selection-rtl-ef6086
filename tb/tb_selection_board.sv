// Testbench of one Selection Board (ECAL electron personality) with 6 links
// and an L0 latency of 20 crossings to keep it short. Loads the LUT through
// the ECS, starts the links and BCRST, checks the L0DU words of every
// crossing and every TELL1 event against tb_crate_pkg, a burst of L0 accepts
// beyond the 16-event queue, the board ID register and the output debug FIFO.
module tb_selection_board;
  import sb_pkg::*;
  import tb_crate_pkg::*;

  localparam int NC = 6, LAT = 20, HIST = 256, NW = NC + 8;

  logic clk = 0, rst_n = 0, bcrst = 0, l0_accept = 0, run = 0;
  logic rx_clk [NC];
  logic [15:0] rx_data [NC];
  logic rx_dv [NC], rx_er [NC];
  partial_t bp_in [N_SLAVES], bp_out;
  logic [31:0] scm_data [N_SCM];
  logic scm_dv [N_SCM];
  logic [15:0] ecs_addr = '0;
  logic ecs_wr = 0, ecs_rd = 0, ecs_rvalid;
  logic [31:0] ecs_wdata = '0, ecs_rdata;
  int checks = 0, failures = 0, cyc = 0, n_out = 0, n_events = 0, n_ovf = 0, accepts = 0;
  int k_at [HIST];
  int ev_k [$], ev_num [$], occ = 0, widx = -1, cur_k = 0, cur_num = 0, t0 = 0;

  selection_board #(.ROLE(ROLE_ELECTRON), .N_CH(NC), .L0_LATENCY(LAT)) dut (.*);

  always #12.476 clk = ~clk;
  for (genvar c = 0; c < NC; c++) begin : g_c
    initial begin
      rx_clk[c] = 0;
      #(0.3 + 1.7 * c);
      forever #6.238 rx_clk[c] = ~rx_clk[c];
    end
    tlk_link_model #(.B(0), .C(c)) u_link (.rx_clk(rx_clk[c]), .run, .rx_data(rx_data[c]),
                                           .rx_dv(rx_dv[c]), .rx_er(rx_er[c]));
  end

  task automatic fail(input string m);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cyc, m);
  endtask

  function automatic logic [31:0] tell1_word(input int k, input int num, input int w);
    partial_t p;
    p = final_partial(0, k, NC);
    if (w == 0) return {4'hC, 1'b0, 3'(ROLE_ELECTRON), 12'(num), 12'(k % BX_PER_ORBIT)};
    if (w <= NC) return link_word(0, w - 1, k);
    if (w == NC + 1) return l0du_word0(12'(k), p);
    if (w == NC + 2) return l0du_word1(12'(k), p);
    return '0;
  endfunction

  always @(negedge clk) cyc++;

  always @(posedge clk) if (rst_n) begin
    k_at[cyc % HIST] = scm_dv[0] ? n_out : -1;
    if (scm_dv[0]) begin
      partial_t p;
      p = final_partial(0, n_out, NC);
      checks++;
      if (scm_data[0] !== l0du_word0(12'(n_out), p) || scm_data[1] !== l0du_word1(12'(n_out), p))
        fail($sformatf("crossing %0d: %h %h exp %h %h", n_out, scm_data[0], scm_data[1],
                       l0du_word0(12'(n_out), p), l0du_word1(12'(n_out), p)));
      checks++;
      if (bp_out != own_partial(0, n_out + 2, NC)) fail("backplane output");
      n_out++;
    end
    if (l0_accept) begin
      if (occ < 16) begin ev_k.push_back(k_at[(cyc - LAT) % HIST]); ev_num.push_back(accepts); occ++; end
      else n_ovf++;
      accepts++;
    end
    if (scm_dv[2]) begin
      if (widx == -1) begin
        if (ev_k.size() == 0) fail("unexpected TELL1 data");
        else begin cur_k = ev_k.pop_front(); cur_num = ev_num.pop_front(); end
        widx = 0; t0 = cyc;
      end
      checks++;
      if (scm_data[2] !== tell1_word(cur_k, cur_num, widx))
        fail($sformatf("event %0d word %0d: %h exp %h", cur_num, widx, scm_data[2], tell1_word(cur_k, cur_num, widx)));
      widx++;
      if (widx == NW) begin
        checks++;
        if (cyc - t0 + 1 != NW) fail("event length");
        widx = -1; occ--; n_events++;
      end
    end else if (widx != -1) begin
      fail("gap in event"); widx = -1; occ--;
    end
  end

  task automatic ecs_write(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk) begin ecs_addr = a; ecs_wdata = d; ecs_wr = 1; end
    @(negedge clk) ecs_wr = 0;
  endtask
  task automatic ecs_read(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk) begin ecs_addr = a; ecs_rd = 1; end
    @(negedge clk) ecs_rd = 0;
    @(negedge clk);
    if (!ecs_rvalid) fail("rvalid");
    d = ecs_rdata;
  endtask

  logic [31:0] d;
  int arm_k;
  initial begin
    bp_in[0] = partial_t'('1); bp_in[1] = partial_t'('1);   // must be ignored by an ECAL board
    repeat (4) @(posedge clk);
    rst_n = 1;
    ecs_read(16'h0000, d);
    checks++; if (d != {16'h5B00, 13'd0, ROLE_ELECTRON}) fail("ID");
    for (int c = 0; c < NC; c++)
      for (int a = 0; a < 256; a++) ecs_write(16'h2000 | 16'(c << 8) | 16'(a), 32'(lut_val(0, c, a)));
    ecs_write(16'h0001, 32'd1);
    @(negedge clk) run = 1;
    repeat (3) @(negedge clk);
    @(negedge clk) bcrst = 1;
    @(negedge clk) bcrst = 0;
    wait (n_out > LAT + 10);
    arm_k = n_out;
    ecs_write(16'h0004, 32'h2);
    for (int i = 0; i < 30; i++) begin
      @(negedge clk) l0_accept = 1;
      @(negedge clk) l0_accept = 0;
      repeat (10 + $urandom % 40) @(negedge clk);
    end
    for (int i = 0; i < 24; i++) begin @(negedge clk) l0_accept = 1; end
    @(negedge clk) l0_accept = 0;
    wait (ev_k.size() == 0 && widx == -1);
    repeat (4) @(negedge clk);
    ecs_read(16'h0005, d);
    checks++; if (d[31:16] != 16'(n_ovf) || n_ovf == 0) fail($sformatf("overflows %0d/%0d", d[31:16], n_ovf));
    // debug FIFO 0 holds L0DU word 0 of 256 consecutive crossings
    begin
      int k0;
      for (int i = 0; i < 256; i++) begin
        ecs_read(16'h0800, d);
        if (i == 0) k0 = int'(d[31:24]) + 256 * ((arm_k) / 256);
        if (i == 0 && k0 < arm_k) k0 += 256;
        checks++;
        if (d !== l0du_word0(12'(k0 + i), final_partial(0, k0 + i, NC))) fail($sformatf("debug %0d: %h", i, d));
      end
    end
    checks++;
    if (n_events < 40) fail($sformatf("events %0d", n_events));
    $display("crossings %0d, events %0d, overflows %0d", n_out, n_events, n_ovf);
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
