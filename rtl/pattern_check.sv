// Link test pattern comparator (bit-error-rate counter).
//
// Checks the words received on an input channel against the pattern the
// transmitter's generator sends (see pattern_gen). Fixed mode compares every
// word with the programmed word. Counter and pseudo-random modes lock on the
// first word received after enable and from then on predict each word from
// the previous prediction, so a corrupted word is counted once and does not
// disturb the following ones. Counts received words, wrong words and wrong
// bits (saturating; the word counter has 48 bits, enough for 81 days at
// 40.08 MHz, so a BER test of a day reaches 1e-13 without wrapping); all counters clear when enable rises.
// The source only says a comparator is provided; the rest is this design's.
module pattern_check
  import sb_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  pat_mode_e         mode,
  input  logic [WORD_W-1:0] fixed,
  input  logic [WORD_W-1:0] din,
  input  logic              din_valid,
  output logic              locked,
  output logic [47:0]       word_cnt,
  output logic [31:0]       word_err_cnt,
  output logic [31:0]       bit_err_cnt
);
  logic              en_q;
  logic [WORD_W-1:0] expected, ref_w, diff;

  assign ref_w = (mode == PAT_FIXED) ? fixed : expected;
  assign diff  = din ^ ref_w;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q <= 1'b0; locked <= 1'b0; expected <= '0;
      word_cnt <= '0; word_err_cnt <= '0; bit_err_cnt <= '0;
    end else begin
      en_q <= enable;
      if (enable && !en_q) begin
        locked <= 1'b0;
        word_cnt <= '0; word_err_cnt <= '0; bit_err_cnt <= '0;
      end else if (enable && din_valid) begin
        if (word_cnt != '1) word_cnt <= word_cnt + 1'b1;
        if (mode != PAT_FIXED && !locked) begin
          locked   <= 1'b1;
          expected <= pat_next(mode, din, fixed);
        end else begin
          locked   <= 1'b1;
          expected <= pat_next(mode, expected, fixed);
          if (diff != '0 && word_err_cnt != '1) word_err_cnt <= word_err_cnt + 1'b1;
          if (bit_err_cnt <= 32'hFFFF_FFFF - 32'd32)
            bit_err_cnt <= bit_err_cnt + 32'($countones(diff));
        end
      end
    end
  end

endmodule
