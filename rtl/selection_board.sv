// Selection Board (SB): one board of the L0 calorimeter Selection Crate.
//
// All eight boards carry the same hardware; ROLE selects the firmware
// personality: one of the four ECAL particle types, HCAL slave, HCAL master,
// or SPD multiplicity. Data flow:
//   28 x input_channel  TLK2501 halves -> 32 bit words -> async FIFO, read
//                       out in step for all channels from the delayed BCRST
//   bc_sync             BCRST delay, read start and bunch counter
//   trigger_process     address LUT, best candidate, sum, HCAL combination
//   derandomizer        record of each crossing, 36 words per L0 accept
//   pattern_gen/check   link tests on the outputs / inputs
//   snapshot_fifo       28 diagnostic FIFOs (inputs) and 3 debug FIFOs
//                       (outputs), 256 words each
//   ecs_regs            configuration and monitoring bus
// The three single-channel transmitters carry: SCM0 L0DU word 0 (best
// candidate), SCM1 L0DU word 1 (sum), SCM2 the TELL1 stream; with the
// generator on, all three send the test pattern instead. This assignment of
// the SCMs and the record layout below are this design's choices.
// TELL1 record (N_CH + 8 words, 36 for 28 channels):
//   0: {4'hC, 1'b0, role[2:0], L0 event number[11:0], bunch id[11:0]}
//   1..N_CH: input words       N_CH+1, N_CH+2: L0DU words 0 and 1
//   next four: slave 0 {et,addr}, slave 0 sum, slave 1 {et,addr}, slave 1 sum
//   last: per-channel er flags of this crossing
// Timing: the L0DU words leave 5 cycles after the FIFO read of a crossing
// (1 FIFO read + 4 trigger_process).
module selection_board
  import sb_pkg::*;
#(
  parameter sb_role_e    ROLE       = ROLE_ELECTRON,
  parameter int unsigned N_CH       = N_CH_SB,
  parameter int unsigned L0_LATENCY = 160
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bcrst,
  input  logic              l0_accept,
  input  logic              rx_clk  [N_CH],
  input  logic [HALF_W-1:0] rx_data [N_CH],
  input  logic              rx_dv   [N_CH],
  input  logic              rx_er   [N_CH],
  input  partial_t          bp_in   [N_SLAVES],
  output partial_t          bp_out,
  output logic [WORD_W-1:0] scm_data [N_SCM],
  output logic              scm_dv   [N_SCM],
  input  logic [15:0]       ecs_addr,
  input  logic              ecs_wr,
  input  logic [31:0]       ecs_wdata,
  input  logic              ecs_rd,
  output logic [31:0]       ecs_rdata,
  output logic              ecs_rvalid
);
  localparam int unsigned N_WORDS = N_CH + 8;
  localparam int unsigned PROC_LAT = 4;

  // configuration
  logic [BCID_W-1:0]  bcrst_delay;
  logic               gen_en, chk_en, diag_arm, dbg_arm, cnt_clr;
  pat_mode_e          gen_mode, chk_mode;
  logic [WORD_W-1:0]  pattern;
  logic               lut_we;
  logic [4:0]         lut_ch;
  logic [LADDR_W-1:0] lut_addr;
  logic [GADDR_W-1:0] lut_wdata, lut_rdata;

  // bunch synchronisation
  logic              bcrst_d, read_en;
  logic [BCID_W-1:0] bcid, bcid_rd;

  bc_sync u_bc (.clk, .rst_n, .bcrst, .delay(bcrst_delay), .bcrst_d, .read_en, .bcid);

  // input channels
  logic [WORD_W-1:0] in_word [N_CH];
  logic              in_err  [N_CH];
  logic              in_valid[N_CH];
  logic [15:0]       err_cnt [N_CH], align_cnt [N_CH], overflow_cnt [N_CH], underflow_cnt [N_CH];
  logic [47:0]       chk_words [N_CH];
  logic [31:0]       chk_werr [N_CH], chk_berr [N_CH];
  logic              chk_locked [N_CH];
  logic              diag_pop [N_CH];
  logic [WORD_W-1:0] diag_dout [N_CH];
  logic [8:0]        diag_count [N_CH];
  logic              diag_rec [N_CH];

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    input_channel u_in (
      .rx_clk(rx_clk[c]), .rx_data(rx_data[c]), .rx_dv(rx_dv[c]), .rx_er(rx_er[c]),
      .clk, .rst_n, .read_en, .clr(cnt_clr),
      .word_q(in_word[c]), .err_q(in_err[c]), .valid_q(in_valid[c]),
      .err_cnt(err_cnt[c]), .align_cnt(align_cnt[c]), .overflow_cnt(overflow_cnt[c]),
      .underflow_cnt(underflow_cnt[c])
    );
    pattern_check u_chk (
      .clk, .rst_n, .enable(chk_en), .mode(chk_mode), .fixed(pattern),
      .din(in_word[c]), .din_valid(in_valid[c]), .locked(chk_locked[c]),
      .word_cnt(chk_words[c]), .word_err_cnt(chk_werr[c]), .bit_err_cnt(chk_berr[c])
    );
    snapshot_fifo #(.WIDTH(WORD_W), .DEPTH(256)) u_diag (
      .clk, .rst_n, .arm(diag_arm), .din(in_word[c]), .din_valid(in_valid[c]),
      .pop(diag_pop[c]), .dout(diag_dout[c]), .count(diag_count[c]), .recording(diag_rec[c])
    );
  end

  // bunch id of the word being read: the counter value of the read cycle
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bcid_rd <= '0;
    else        bcid_rd <= bcid;
  end

  // trigger processing
  partial_t          bp_seen [N_SLAVES];
  logic [WORD_W-1:0] l0du_w0, l0du_w1;
  logic              out_valid;
  logic [BCID_W-1:0] out_bcid;

  trigger_process #(.ROLE(ROLE), .N_CH(N_CH)) u_proc (
    .clk, .rst_n, .in_word, .in_valid(in_valid[0]), .bcid(bcid_rd),
    .lut_we, .lut_ch, .lut_addr, .lut_wdata, .lut_rdata,
    .bp_out, .bp_in, .bp_seen,
    .l0du_w0, .l0du_w1, .out_valid, .out_bcid
  );

  // inputs delayed to line up with the results for the TELL1 record
  logic [WORD_W-1:0] dly_word [PROC_LAT][N_CH];
  logic [N_CH-1:0]   dly_err  [PROC_LAT];
  always_ff @(posedge clk) begin
    for (int c = 0; c < N_CH; c++) begin
      dly_word[0][c] <= in_word[c];
      dly_err[0][c]  <= in_err[c];
    end
    for (int s = 1; s < PROC_LAT; s++) begin
      dly_word[s] <= dly_word[s-1];
      dly_err[s]  <= dly_err[s-1];
    end
  end

  // slave results of the same crossing, one more cycle to line up
  partial_t bp_rec [N_SLAVES];
  always_ff @(posedge clk) bp_rec <= bp_seen;

  logic [WORD_W-1:0] rec [N_WORDS];
  always_comb begin
    rec[0] = {4'hC, 1'b0, ROLE, 12'h000, out_bcid};
    for (int c = 0; c < N_CH; c++) rec[1 + c] = dly_word[PROC_LAT-1][c];
    rec[N_CH + 1] = l0du_w0;
    rec[N_CH + 2] = l0du_w1;
    rec[N_CH + 3] = {bp_rec[0].et, bp_rec[0].addr, 10'd0};
    rec[N_CH + 4] = 32'(bp_rec[0].sum);
    rec[N_CH + 5] = {bp_rec[1].et, bp_rec[1].addr, 10'd0};
    rec[N_CH + 6] = 32'(bp_rec[1].sum);
    rec[N_CH + 7] = 32'(dly_err[PROC_LAT-1]);
  end

  logic [WORD_W-1:0] tx_data;
  logic              tx_dv, tx_first;
  logic [5:0]        dr_occ;
  logic [15:0]       dr_acc, dr_ovf;

  derandomizer #(.N_WORDS(N_WORDS), .N_EVENTS(16), .L0_LATENCY(L0_LATENCY)) u_dr (
    .clk, .rst_n, .rec, .l0_accept, .clr(cnt_clr),
    .tx_data, .tx_dv, .tx_first, .occupancy(dr_occ), .accept_cnt(dr_acc), .overflow_cnt(dr_ovf)
  );

  // output selection: trigger data or link test pattern
  logic [WORD_W-1:0] gen_word;
  logic              gen_valid;
  pattern_gen u_gen (.clk, .rst_n, .enable(gen_en), .mode(gen_mode), .seed(pattern),
                     .word(gen_word), .valid(gen_valid));

  always_comb begin
    if (gen_en) begin
      for (int k = 0; k < N_SCM; k++) begin
        scm_data[k] = gen_word;
        scm_dv[k]   = gen_valid;
      end
    end else begin
      scm_data[0] = l0du_w0; scm_dv[0] = out_valid;
      scm_data[1] = l0du_w1; scm_dv[1] = out_valid;
      scm_data[2] = tx_data; scm_dv[2] = tx_dv;
    end
  end

  // debug FIFOs on the three outputs
  logic              dbg_pop [N_SCM];
  logic [WORD_W-1:0] dbg_dout [N_SCM];
  logic [8:0]        dbg_count [N_SCM];
  logic              dbg_rec [N_SCM];
  for (genvar k = 0; k < N_SCM; k++) begin : g_dbg
    snapshot_fifo #(.WIDTH(WORD_W), .DEPTH(256)) u_dbg (
      .clk, .rst_n, .arm(dbg_arm), .din(scm_data[k]), .din_valid(scm_dv[k]),
      .pop(dbg_pop[k]), .dout(dbg_dout[k]), .count(dbg_count[k]), .recording(dbg_rec[k])
    );
  end

  ecs_regs #(.ROLE(ROLE), .N_CH(N_CH)) u_ecs (
    .clk, .rst_n, .ecs_addr, .ecs_wr, .ecs_wdata, .ecs_rd, .ecs_rdata, .ecs_rvalid,
    .bcrst_delay, .gen_en, .gen_mode, .chk_en, .chk_mode, .pattern, .diag_arm, .dbg_arm, .cnt_clr,
    .lut_we, .lut_ch, .lut_addr, .lut_wdata, .lut_rdata,
    .diag_pop, .diag_dout, .diag_count, .dbg_pop, .dbg_dout, .dbg_count,
    .err_cnt, .align_cnt, .overflow_cnt, .underflow_cnt, .chk_words, .chk_werr, .chk_berr,
    .dr_occupancy(dr_occ), .dr_accepts(dr_acc), .dr_overflows(dr_ovf), .running(read_en), .bcid
  );

endmodule
