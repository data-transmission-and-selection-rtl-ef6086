// Behavioural model of one optical link as seen at the TLK2501 outputs:
// after run rises, sends tb_crate_pkg::link_word(B, C, n) for n = 0, 1, ...
// as two 16 bit halves (low first) with dv, one half per recovered clock,
// and raises er on the low half of word ER_N.
module tlk_link_model
  import tb_crate_pkg::*;
#(
  parameter int B = 0,
  parameter int C = 0,
  parameter int ER_N = -1
) (
  input  logic        rx_clk,
  input  logic        run,
  output logic [15:0] rx_data,
  output logic        rx_dv,
  output logic        rx_er
);
  int n = 0;
  bit half = 0;
  logic [31:0] w;

  initial begin rx_data = 16'hBCBC; rx_dv = 0; rx_er = 0; end

  always @(negedge rx_clk) begin
    if (!run) begin
      rx_dv <= 0; rx_er <= 0; rx_data <= 16'hBCBC; half <= 0;
    end else if (!half) begin
      w = link_word(B, C, n);
      rx_data <= w[15:0]; rx_dv <= 1; rx_er <= (n == ER_N); half <= 1;
    end else begin
      rx_data <= w[31:16]; rx_dv <= 1; rx_er <= 0; half <= 0; n <= n + 1;
    end
  end
endmodule
