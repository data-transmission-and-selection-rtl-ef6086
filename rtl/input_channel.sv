// One optical input channel of the Selection Board, after the deserializer.
//
// rx side (recovered clock): tlk_demux rebuilds the 32 bit word; the write
// control stores every rebuilt word, with its error flag, into the
// asynchronous FIFO, so writing is driven by the deserializer dv signal as in
// the source. sys side (40.08 MHz): while read_en is high one word per cycle
// is read; read_en comes from bc_sync, the same for all channels, which makes
// the channels read out synchronously.
// Counters (a choice of this design, 16 bit, saturating, cleared by clr):
// words flagged with er, framing faults, FIFO overflows (a word arriving
// while the FIFO is full, so it is lost) and FIFO underflows (read_en while
// empty) seen in the sys domain. The framing fault and overflow pulses cross
// clock domains through toggle synchronisers; two events closer together
// than a sys cycle may count once.
// Timing: word_q/valid_q follow read_en by one cycle (FIFO read register).
// The two reset-synchroniser flops take rst_n as asynchronous reset and shift
// a constant one, so lint sees them used both as reset and as data; intended.
module input_channel
  import sb_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic              rx_clk,
  input  logic [HALF_W-1:0] rx_data,
  input  logic              rx_dv,
  input  logic              rx_er,
  input  logic              clk,
  input  logic              rst_n,
  input  logic              read_en,
  input  logic              clr,
  output logic [WORD_W-1:0] word_q,
  output logic              err_q,
  output logic              valid_q,
  output logic [15:0]       err_cnt,
  output logic [15:0]       align_cnt,
  output logic [15:0]       overflow_cnt,
  output logic [15:0]       underflow_cnt
);
  // reset synchroniser for the recovered clock domain
  logic [1:0] rx_rst_sync;
  logic       rx_rst_n;
  always_ff @(posedge rx_clk or negedge rst_n) begin
    if (!rst_n) rx_rst_sync <= 2'b00;
    else        rx_rst_sync <= {rx_rst_sync[0], 1'b1};
  end
  assign rx_rst_n = rx_rst_sync[1];

  logic [WORD_W-1:0] dm_word;
  logic              dm_err, dm_valid, dm_align;
  logic              wfull;

  tlk_demux u_demux (
    .rx_clk, .rx_rst_n, .rx_data, .rx_dv, .rx_er,
    .word(dm_word), .word_err(dm_err), .word_valid(dm_valid), .align_err(dm_align)
  );

  logic              fempty;
  logic [WORD_W:0]   rd;

  async_fifo #(.WIDTH(WORD_W + 1), .DEPTH(FIFO_DEPTH)) u_fifo (
    .wclk(rx_clk), .wrst_n(rx_rst_n), .wen(dm_valid), .wdata({dm_err, dm_word}), .full(wfull),
    .rclk(clk), .rrst_n(rst_n), .ren(read_en), .rdata(rd), .rvalid(valid_q), .empty(fempty)
  );
  assign word_q = rd[WORD_W-1:0];
  assign err_q  = rd[WORD_W] & valid_q;

  // framing fault: toggle in rx domain, edge detect in sys domain
  logic       al_tog, of_tog;
  logic [2:0] al_sync, of_sync;
  always_ff @(posedge rx_clk or negedge rx_rst_n) begin
    if (!rx_rst_n) begin
      al_tog <= 1'b0;
      of_tog <= 1'b0;
    end else begin
      if (dm_align)           al_tog <= ~al_tog;
      if (dm_valid && wfull)  of_tog <= ~of_tog;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      al_sync       <= '0;
      of_sync       <= '0;
      err_cnt       <= '0;
      align_cnt     <= '0;
      overflow_cnt  <= '0;
      underflow_cnt <= '0;
    end else begin
      al_sync <= {al_sync[1:0], al_tog};
      of_sync <= {of_sync[1:0], of_tog};
      if (clr) begin
        err_cnt       <= '0;
        align_cnt     <= '0;
        overflow_cnt  <= '0;
        underflow_cnt <= '0;
      end else begin
        if (err_q && err_cnt != '1)                      err_cnt       <= err_cnt + 1'b1;
        if ((al_sync[2] ^ al_sync[1]) && align_cnt != '1) align_cnt     <= align_cnt + 1'b1;
        if ((of_sync[2] ^ of_sync[1]) && overflow_cnt != '1) overflow_cnt <= overflow_cnt + 1'b1;
        if (read_en && fempty && underflow_cnt != '1)     underflow_cnt <= underflow_cnt + 1'b1;
      end
    end
  end

endmodule
