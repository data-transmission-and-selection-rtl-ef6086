// Trigger algorithm of the process FPGA.
//
// Per bunch crossing, in sequence: 8 to 14 bit address translation of every
// candidate (addr_lut), selection of the highest-energy candidate (max_select)
// and sum of the energies (et_sum); on the HCAL master board, combination of
// its own partial result with those of the two HCAL slave boards received over
// the backplane. The results are formatted into the two L0DU words.
// The source gives this sequence; the pipeline cut, the combination rule (max
// of the three best candidates, sum of the three sums, own board first on
// ties) and the word format are this design's choices.
// Pipeline (cycles after in_valid): 1 LUT, 2 partial (bp_out), 3 backplane
// register, 4 L0DU words (out_valid). Latency is the same for every role.
// Slave partial results must arrive on bp_in in the same cycle the slave
// boards present them on bp_out (all boards read their inputs in step).
module trigger_process
  import sb_pkg::*;
#(
  parameter sb_role_e    ROLE = ROLE_ELECTRON,
  parameter int unsigned N_CH = N_CH_SB
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [WORD_W-1:0]   in_word [N_CH],
  input  logic                in_valid,
  input  logic [BCID_W-1:0]   bcid,
  // LUT load / read-back from ECS
  input  logic                lut_we,
  input  logic [4:0]          lut_ch,
  input  logic [LADDR_W-1:0]  lut_addr,
  input  logic [GADDR_W-1:0]  lut_wdata,
  output logic [GADDR_W-1:0]  lut_rdata,
  // backplane
  output partial_t            bp_out,
  input  partial_t            bp_in [N_SLAVES],
  output partial_t            bp_seen [N_SLAVES],
  // results
  output logic [WORD_W-1:0]   l0du_w0,
  output logic [WORD_W-1:0]   l0du_w1,
  output logic                out_valid,
  output logic [BCID_W-1:0]   out_bcid
);
  localparam bit MASTER = (ROLE == ROLE_HCAL_MASTER);

  // stage 1: LUT
  logic [LADDR_W-1:0] laddr [N_CH];
  logic [GADDR_W-1:0] gaddr [N_CH];
  logic [ET_W-1:0]    et_s1 [N_CH];
  logic               v1, v2, v3;
  logic [BCID_W-1:0]  b1, b2, b3;

  always_comb for (int c = 0; c < N_CH; c++) laddr[c] = in_word[c][15:8];

  addr_lut #(.N_CH(N_CH)) u_lut (
    .clk, .we(lut_we), .wch(lut_ch), .waddr(lut_addr), .wdata(lut_wdata),
    .raddr(laddr), .rdata(gaddr), .rb_ch(lut_ch), .rb_addr(lut_addr), .rb_data(lut_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++) et_s1[c] <= '0;
    end else begin
      for (int c = 0; c < N_CH; c++) et_s1[c] <= in_word[c][7:0];
    end
  end

  // stage 2: selection and sum
  logic [ET_W-1:0]    m_et;
  logic [GADDR_W-1:0] m_addr;
  logic [4:0]         m_ch;
  logic [SUM_W-1:0]   s_sum;

  max_select #(.N(N_CH)) u_max (.et(et_s1), .addr(gaddr), .max_et(m_et), .max_addr(m_addr), .max_ch(m_ch));
  et_sum     #(.N(N_CH)) u_sum (.et(et_s1), .sum(s_sum));

  // stage 3: own partial and backplane registered together
  partial_t own_s3;
  partial_t comb;

  always_comb begin
    comb = own_s3;
    if (MASTER) begin
      comb.sum = own_s3.sum + bp_seen[0].sum + bp_seen[1].sum;
      for (int s = 0; s < N_SLAVES; s++)
        if (bp_seen[s].et > comb.et) begin
          comb.et   = bp_seen[s].et;
          comb.addr = bp_seen[s].addr;
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; out_valid <= 1'b0;
      b1 <= '0; b2 <= '0; b3 <= '0; out_bcid <= '0;
      bp_out <= '0; own_s3 <= '0;
      bp_seen[0] <= '0; bp_seen[1] <= '0;
      l0du_w0 <= '0; l0du_w1 <= '0;
    end else begin
      v1 <= in_valid; b1 <= bcid;
      v2 <= v1;       b2 <= b1;
      v3 <= v2;       b3 <= b2;
      out_valid <= v3; out_bcid <= b3;
      bp_out <= '{et: m_et, addr: m_addr, sum: s_sum};
      own_s3 <= bp_out;
      for (int s = 0; s < N_SLAVES; s++) bp_seen[s] <= MASTER ? bp_in[s] : '0;
      l0du_w0 <= l0du_word0(b3, comb);
      l0du_w1 <= l0du_word1(b3, comb);
    end
  end

endmodule
