// End-to-end testbench of the Selection Crate at its full size: 8 boards,
// 28 links each, L0 latency 160 crossings, no parameter overridden.
//
// All 224 links are driven by deserializer models with their own recovered
// clock phases. The bench loads every address LUT through the ECS, sets the
// BCRST delay, starts the links and sends BCRST. Then for every board and
// every crossing it checks the two L0DU words against tb_crate_pkg (highest
// candidate with global address, energy sum, HCAL master combination, SPD
// multiplicity), and every TELL1 event against the record of the accepted
// crossing. It also exercises: a burst of 20 consecutive L0 accepts (16
// queued, 4 overflows), an er flag on one link, the diagnostic FIFO of one
// input, a debug FIFO of one output, the comparator on the SPD board's
// counter-pattern links (one corrupted bit) and the output pattern generator
// with a switch back to trigger data. Each mechanism is counted and one that
// never happened counts as a failure.
module tb_selection_crate;
  import sb_pkg::*;
  import tb_crate_pkg::*;

  localparam int NB = N_SB, NC = N_CH_SB, LAT = 160, HIST = 1024;

  logic clk = 0, rst_n = 0, bcrst = 0, l0_accept = 0, run = 0;
  logic rx_clk [NB][NC];
  logic [15:0] rx_data [NB][NC];
  logic rx_dv [NB][NC], rx_er [NB][NC];
  logic [31:0] scm_data [NB][N_SCM];
  logic scm_dv [NB][N_SCM];
  logic [15:0] ecs_addr [NB];
  logic ecs_wr [NB], ecs_rd [NB], ecs_rvalid [NB];
  logic [31:0] ecs_wdata [NB], ecs_rdata [NB];

  int checks = 0, failures = 0, cyc = 0;
  // mechanism counters
  int n_l0du [NB], n_tell1_events = 0, n_overflow = 0, n_master_slave_win = 0;
  int n_spd = 0, n_diag = 0, n_debug = 0, n_cmp_err = 0, n_link_err = 0, n_pattern = 0;
  int n_resume = 0, n_lut = 0, n_er_event_accepted = 0, n_er_event_seen = 0;

  selection_crate dut (.*);

  // 40.08 MHz and, per link, 80.16 MHz recovered clocks with scattered phases
  always #12.476 clk = ~clk;
  for (genvar b = 0; b < NB; b++) begin : g_b
    for (genvar c = 0; c < NC; c++) begin : g_c
      initial begin
        rx_clk[b][c] = 0;
        #(0.1 + 0.43 * ((b * NC + c) % 29));
        forever #6.238 rx_clk[b][c] = ~rx_clk[b][c];
      end
      tlk_link_model #(.B(b), .C(c), .ER_N((b == ER_BOARD && c == ER_CH) ? ER_AT : -1)) u_link (
        .rx_clk(rx_clk[b][c]), .run, .rx_data(rx_data[b][c]), .rx_dv(rx_dv[b][c]), .rx_er(rx_er[b][c]));
    end
  end

  task automatic fail(input string m);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cyc, m);
  endtask

  // ---------------- L0DU outputs ----------------
  bit gen_phase [NB], resync [NB];
  int k_at [HIST];
  always @(posedge clk) if (rst_n) begin
    k_at[cyc % HIST] = scm_dv[0][0] ? n_l0du[0] : -1;
    for (int b = 0; b < NB; b++) begin
      if (scm_dv[b][0] && !gen_phase[b]) begin
        int k;
        partial_t p, o;
        logic [11:0] bx;
        if (resync[b]) begin n_l0du[b] = n_l0du[0] - 1; resync[b] = 0; end
        k = n_l0du[b];
        bx = 12'(k % BX_PER_ORBIT);
        p = final_partial(b, k, NC);
        checks++;
        if (scm_data[b][1][31:20] != bx)
          fail($sformatf("board %0d: bunch id %0d, expected %0d", b, scm_data[b][1][31:20], bx));
        if (scm_data[b][0] !== l0du_word0(bx, p) || scm_data[b][1] !== l0du_word1(bx, p))
          fail($sformatf("board %0d crossing %0d: %h %h exp %h %h", b, k, scm_data[b][0], scm_data[b][1],
                         l0du_word0(bx, p), l0du_word1(bx, p)));
        if (!scm_dv[b][1]) fail("word 1 valid");
        n_l0du[b]++;
        n_lut++;
        if (b == MASTER) begin
          o = own_partial(b, k, NC);
          if (o.et != p.et || o.addr != p.addr) n_master_slave_win++;
        end
        if (b == SPD_BOARD) n_spd++;
      end
    end
  end
  // the cycle number changes between clock edges, so every block sampling at
  // a rising edge sees the same value
  always @(negedge clk) cyc++;

  // ---------------- TELL1 streams ----------------
  int ev_k [NB][$], ev_num [NB][$], occ [NB], widx [NB], cur_k [NB], cur_num [NB], t_first [NB];
  int accepts = 0;
  initial for (int b = 0; b < NB; b++) begin occ[b] = 0; widx[b] = -1; n_l0du[b] = 0; gen_phase[b] = 0; resync[b] = 0; end

  function automatic logic [31:0] tell1_word(input int b, input int k, input int num, input int w);
    partial_t p, s4, s5;
    if (w == 0) return {4'hC, 1'b0, 3'(role_of(b)), 12'(num), 12'(k % BX_PER_ORBIT)};
    if (w <= NC) return link_word(b, w - 1, k);
    p = final_partial(b, k, NC);
    if (w == NC + 1) return l0du_word0(12'(k % BX_PER_ORBIT), p);
    if (w == NC + 2) return l0du_word1(12'(k % BX_PER_ORBIT), p);
    if (w == NC + 7) return (b == ER_BOARD && k == ER_AT) ? 32'(1) << ER_CH : 32'd0;
    if (b != MASTER) return '0;
    s4 = own_partial(4, k, NC);
    s5 = own_partial(5, k, NC);
    case (w - NC)
      3: return {s4.et, s4.addr, 10'd0};
      4: return 32'(s4.sum);
      5: return {s5.et, s5.addr, 10'd0};
      default: return 32'(s5.sum);
    endcase
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (l0_accept) begin
      int k;
      k = k_at[(cyc - LAT) % HIST];
      for (int b = 0; b < NB; b++) begin
        if (occ[b] < 16) begin ev_k[b].push_back(k); ev_num[b].push_back(accepts); occ[b]++; end
        else if (b == 0) n_overflow++;
      end
      accepts++;
    end
    for (int b = 0; b < NB; b++) begin
      if (scm_dv[b][2] && !gen_phase[b]) begin
        if (widx[b] == -1) begin
          if (ev_k[b].size() == 0) begin fail($sformatf("board %0d: unexpected TELL1 data", b)); continue; end
          cur_k[b] = ev_k[b].pop_front(); cur_num[b] = ev_num[b].pop_front();
          widx[b] = 0; t_first[b] = cyc;
        end
        checks++;
        if (scm_data[b][2] !== tell1_word(b, cur_k[b], cur_num[b], widx[b]))
          fail($sformatf("board %0d event %0d word %0d: %h exp %h", b, cur_num[b], widx[b],
                         scm_data[b][2], tell1_word(b, cur_k[b], cur_num[b], widx[b])));
        if (b == ER_BOARD && widx[b] == NC + 7 && scm_data[b][2] != 0) n_er_event_seen++;
        widx[b]++;
        if (widx[b] == NC + 8) begin
          checks++;
          if (cyc - t_first[b] + 1 != 36) fail("TELL1 event not 36 words in 36 cycles");
          if (real'(cyc - t_first[b] + 1) * 24.952 > 900.0) fail("TELL1 event over 900 ns");
          widx[b] = -1; occ[b]--;
          if (b == 0) n_tell1_events++;
        end
      end else if (widx[b] != -1 && !gen_phase[b]) begin
        fail("gap in a TELL1 event"); widx[b] = -1; occ[b]--;
      end
    end
  end

  // ---------------- ECS access ----------------
  task automatic ecs_write(input int b, input logic [15:0] a, input logic [31:0] d);
    @(negedge clk) begin ecs_addr[b] = a; ecs_wdata[b] = d; ecs_wr[b] = 1; end
    @(negedge clk) ecs_wr[b] = 0;
  endtask
  task automatic ecs_read(input int b, input logic [15:0] a, output logic [31:0] d);
    @(negedge clk) begin ecs_addr[b] = a; ecs_rd[b] = 1; end
    @(negedge clk) ecs_rd[b] = 0;
    @(negedge clk);
    if (!ecs_rvalid[b]) fail("ECS read data not valid after 2 cycles");
    d = ecs_rdata[b];
  endtask

  task automatic load_luts();
    for (int c = 0; c < NC; c++)
      for (int a = 0; a < 256; a++) begin
        @(negedge clk);
        for (int b = 0; b < NB; b++) begin
          ecs_addr[b] = 16'h2000 | 16'(c << 8) | 16'(a);
          ecs_wdata[b] = 32'(lut_val(b, c, a));
          ecs_wr[b] = 1;
        end
      end
    @(negedge clk) for (int b = 0; b < NB; b++) ecs_wr[b] = 0;
  endtask

  task automatic accept_burst(input int n);
    for (int i = 0; i < n; i++) @(negedge clk) l0_accept = 1;
    @(negedge clk) l0_accept = 0;
  endtask

  logic [31:0] d;
  int arm_k = 0;
  initial begin
    for (int b = 0; b < NB; b++) begin
      ecs_addr[b] = '0; ecs_wr[b] = 0; ecs_rd[b] = 0; ecs_wdata[b] = '0;
    end
    repeat (4) @(posedge clk);
    rst_n = 1;
    load_luts();
    ecs_read(3, 16'h2000 | 16'(7 << 8) | 16'(99), d);
    checks++; if (d != 32'(lut_val(3, 7, 99))) fail("LUT read-back");
    for (int b = 0; b < NB; b++) ecs_write(b, 16'h0001, 32'd2);        // BCRST delay
    ecs_write(SPD_BOARD, 16'h0002, 32'h18);                             // comparator, counter mode
    @(negedge clk) run = 1;
    repeat (3) @(negedge clk);
    @(negedge clk) bcrst = 1;
    @(negedge clk) bcrst = 0;
    wait (n_l0du[0] > LAT + 20);
    // arm the diagnostic and debug FIFOs
    arm_k = n_l0du[0];
    fork
      ecs_write(0, 16'h0004, 32'h1);
      ecs_write(MASTER, 16'h0004, 32'h2);
    join
    // make sure the crossing with the er flag is accepted
    forever begin
      @(negedge clk);
      #1;
      if (k_at[(cyc - LAT) % HIST] == ER_AT) break;
    end
    l0_accept = 1;
    @(negedge clk) l0_accept = 0;
    n_er_event_accepted = 1;
    // sparse L0 accepts
    for (int i = 0; i < 40; i++) begin
      @(negedge clk) l0_accept = 1;
      @(negedge clk) l0_accept = 0;
      repeat (20 + $urandom % 60) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    // burst of consecutive accepts beyond the 16 the buffer holds
    accept_burst(20);
    wait (ev_k[0].size() == 0 && widx[0] == -1);
    repeat (5) @(negedge clk);
    for (int b = 0; b < NB; b++) begin
      ecs_read(b, 16'h0005, d);
      checks++;
      if (d[31:16] != 16'(n_overflow)) fail($sformatf("board %0d overflow count %0d exp %0d", b, d[31:16], n_overflow));
    end
    // diagnostic FIFO of board 0, input 2: 256 consecutive words
    begin
      int k0;
      ecs_read(0, 16'h0702, d);
      checks++; if (d != 32'd256) fail($sformatf("diag count %0d", d));
      for (int i = 0; i < 256; i++) begin
        ecs_read(0, 16'h0602, d);
        if (i == 0) k0 = int'(d[31:16]);
        checks++;
        if (d !== link_word(0, 2, k0 + i)) fail($sformatf("diag word %0d: %h", i, d));
        else n_diag++;
      end
    end
    // debug FIFO 1 (L0DU word 1) of the HCAL master
    begin
      int k0;
      for (int i = 0; i < 256; i++) begin
        ecs_read(MASTER, 16'h0801, d);
        if (i == 0) begin
          k0 = int'(d[31:20]);
          while (k0 < arm_k) k0 += BX_PER_ORBIT;
        end
        checks++;
        if (d !== l0du_word1(12'((k0 + i) % BX_PER_ORBIT), final_partial(MASTER, k0 + i, NC))) fail($sformatf("debug word %0d: %h", i, d));
        else n_debug++;
      end
    end
    // comparator on the SPD board
    for (int c = 0; c < NC; c++) begin
      logic [31:0] words, werr, berr;
      ecs_read(SPD_BOARD, 16'h0300 | 16'(c), words);
      ecs_read(SPD_BOARD, 16'h0400 | 16'(c), werr);
      ecs_read(SPD_BOARD, 16'h0500 | 16'(c), berr);
      checks++;
      if (words < 32'(BAD_AT + 10)) fail($sformatf("comparator words %0d", words));
      if (werr != ((c == BAD_CH) ? 32'd1 : 32'd0) || berr != werr) fail($sformatf("comparator ch %0d: %0d %0d", c, werr, berr));
      if (c == BAD_CH && werr == 1) n_cmp_err++;
    end
    // er counter
    for (int c = 0; c < NC; c++) begin
      ecs_read(ER_BOARD, 16'h0100 | 16'(c), d);
      checks++;
      if (d != ((c == ER_CH) ? 32'd1 : 32'd0)) fail($sformatf("link error count ch %0d: %h", c, d));
      else if (c == ER_CH) n_link_err++;
    end
    // output pattern generator on board 1, then back to trigger data
    begin
      logic [31:0] e;
      ecs_write(1, 16'h0003, 32'h1357_9BDF);
      gen_phase[1] = 1;
      ecs_write(1, 16'h0002, 32'h5);
      e = 32'h1357_9BDF;
      for (int i = 0; i < 100; i++) begin
        @(negedge clk);
        checks++;
        if (!scm_dv[1][0] || scm_data[1][0] !== e || scm_data[1][1] !== e || scm_data[1][2] !== e)
          fail($sformatf("pattern word %0d: %h exp %h", i, scm_data[1][0], e));
        else n_pattern++;
        e = lfsr_model(e);
      end
      ecs_write(1, 16'h0002, 32'h0);
      n_resume = n_l0du[1];
      @(negedge clk) begin resync[1] = 1; gen_phase[1] = 0; end
      repeat (50) @(negedge clk);
      checks++;
      if (n_l0du[1] - n_resume < 45) fail("board 1 did not return to trigger data");
    end
    // mechanisms seen
    checks += 11;
    if (n_er_event_seen != 1)            fail("TELL1 record never carried the er flag");
    if (n_l0du[0] < 500 || n_lut == 0)   fail("too few crossings processed");
    if (n_tell1_events < 40)             fail($sformatf("TELL1 events %0d", n_tell1_events));
    if (n_overflow != 4)                 fail($sformatf("overflows %0d", n_overflow));
    if (n_master_slave_win == 0)         fail("HCAL slave candidate never won on the master");
    if (n_spd == 0)                      fail("SPD multiplicity never produced");
    if (n_diag != 256)                   fail("diagnostic FIFO");
    if (n_debug != 256)                  fail("debug FIFO");
    if (n_cmp_err != 1)                  fail("comparator error not seen");
    if (n_link_err != 1)                 fail("link error not counted");
    if (n_pattern != 100)                fail("pattern generator");
    $display("crossings %0d, TELL1 events %0d, overflows %0d, master took slave candidate %0d times",
             n_l0du[0], n_tell1_events, n_overflow, n_master_slave_win);
    $display("SPD results %0d, diag words %0d, debug words %0d, comparator errors %0d, link errors %0d, pattern words %0d",
             n_spd, n_diag, n_debug, n_cmp_err, n_link_err, n_pattern);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
