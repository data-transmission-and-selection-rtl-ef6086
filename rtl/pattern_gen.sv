// Link test pattern generator.
//
// Produces one 32 bit word per cycle for connectivity and bit-error-rate
// tests of the optical links from the board to the L0DU and TELL1. Modes
// (ECS-programmed): a fixed word, an incrementing counter, or a 32 bit
// pseudo-random sequence (Galois LFSR x^32+x^22+x^2+x+1, one step per word).
// The counter and the sequence restart from the programmed seed when enable
// rises; a zero seed is replaced by 1 for the sequence. The source only says
// the generator is ECS programmable; the modes are this design's choice.
// Timing: word is registered; the seed appears the cycle after enable rises.
module pattern_gen
  import sb_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  pat_mode_e         mode,
  input  logic [WORD_W-1:0] seed,
  output logic [WORD_W-1:0] word,
  output logic              valid
);
  logic en_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q  <= 1'b0;
      word  <= '0;
      valid <= 1'b0;
    end else begin
      en_q  <= enable;
      valid <= enable;
      if (enable && !en_q) begin
        word <= (mode == PAT_PRBS && seed == '0) ? 32'd1 : seed;
      end else if (enable) begin
        word <= pat_next(mode, word, seed);
      end
    end
  end

endmodule
