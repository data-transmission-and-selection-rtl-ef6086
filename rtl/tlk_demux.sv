// TLK2501 output demultiplexer: rebuilds the 32 bit link words.
//
// The deserializer delivers each 32 bit word sent at 40.08 MHz as two 16 bit
// halves at 80.156 MHz, with the dv and er flags. This block pairs the halves
// back into one word, flags words in which either half came with er, and
// counts framing faults. Runs entirely in the recovered clock domain.
//
// Flags (TLK2501 convention): dv=1 er=0 data, dv=1 er=1 error propagation,
// dv=0 er=1 carrier extend, dv=0 er=0 idle.
// Alignment (a choice of this design): the first half-word after an idle is
// the low half; an idle while a high half is awaited drops the pending low
// half and raises align_err for one cycle.
// Timing: word/word_valid are registered, one rx_clk after the high half.
module tlk_demux
  import sb_pkg::*;
(
  input  logic              rx_clk,
  input  logic              rx_rst_n,
  input  logic [HALF_W-1:0] rx_data,
  input  logic              rx_dv,
  input  logic              rx_er,
  output logic [WORD_W-1:0] word,
  output logic              word_err,
  output logic              word_valid,
  output logic              align_err
);

  logic              phase;    // 1: low half held, waiting for high half
  logic [HALF_W-1:0] lo_q;
  logic              lo_err_q;

  always_ff @(posedge rx_clk or negedge rx_rst_n) begin
    if (!rx_rst_n) begin
      phase      <= 1'b0;
      lo_q       <= '0;
      lo_err_q   <= 1'b0;
      word       <= '0;
      word_err   <= 1'b0;
      word_valid <= 1'b0;
      align_err  <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      align_err  <= 1'b0;
      if (rx_dv) begin
        if (!phase) begin
          lo_q     <= rx_data;
          lo_err_q <= rx_er;
          phase    <= 1'b1;
        end else begin
          word       <= {rx_data, lo_q};
          word_err   <= rx_er | lo_err_q;
          word_valid <= 1'b1;
          phase      <= 1'b0;
        end
      end else begin
        if (phase) align_err <= 1'b1;
        phase <= 1'b0;
      end
    end
  end

endmodule
