// Local-to-global cluster address translation table.
//
// Each input channel has its own 256 x 14 bit table, indexed by the 8 bit
// local address that the front-end board puts in the candidate word; the
// output is the 14 bit global address (absolute position of the deposit).
// The tables are loaded through the ECS at start-up. All channels are looked
// up in parallel every cycle, one table per channel as in block RAM.
// Write: one entry per cycle (we, wch, waddr, wdata). Read-back for the ECS
// on a separate port. Both read ports are registered: data one cycle after
// the address. Table contents are not reset.
module addr_lut
  import sb_pkg::*;
#(
  parameter int unsigned N_CH = N_CH_SB
) (
  input  logic                       clk,
  input  logic                       we,
  input  logic [4:0]                 wch,
  input  logic [LADDR_W-1:0]         waddr,
  input  logic [GADDR_W-1:0]         wdata,
  input  logic [LADDR_W-1:0]         raddr [N_CH],
  output logic [GADDR_W-1:0]         rdata [N_CH],
  input  logic [4:0]                 rb_ch,
  input  logic [LADDR_W-1:0]         rb_addr,
  output logic [GADDR_W-1:0]         rb_data
);
  logic [GADDR_W-1:0] mem [N_CH][2**LADDR_W];

  always_ff @(posedge clk) begin
    if (we && wch < 5'(N_CH)) mem[wch][waddr] <= wdata;
    for (int c = 0; c < N_CH; c++) rdata[c] <= mem[c][raddr[c]];
    rb_data <= (rb_ch < 5'(N_CH)) ? mem[rb_ch][rb_addr] : '0;
  end

endmodule
