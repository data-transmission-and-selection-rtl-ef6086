// L0 calorimeter Selection Crate: top level.
//
// Eight Selection Boards in one crate, each receiving 28 links from the
// Validation Cards: boards 0..3 handle the ECAL candidates (electron, photon,
// local pi0, global pi0), boards 4 and 5 are HCAL slaves, board 6 the HCAL
// master, board 7 computes the SPD multiplicity. The custom rear backplane
// is modelled as wires carrying the slaves' partial results (best candidate
// and energy sum) to the master. The source gives the board count, the roles
// and the master/slave backplane; the assignment of board slots and of the
// four ECAL boards to particle types is this design's choice.
// Each board has its own ECS bus and its three output links, brought out as
// arrays indexed by board. All boards share the 40.08 MHz clock, BCRST and the
// L0 accept; every link has its own recovered clock.
module selection_crate
  import sb_pkg::*;
#(
  parameter int unsigned N_CH       = N_CH_SB,
  parameter int unsigned L0_LATENCY = 160
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bcrst,
  input  logic              l0_accept,
  input  logic              rx_clk  [N_SB][N_CH],
  input  logic [HALF_W-1:0] rx_data [N_SB][N_CH],
  input  logic              rx_dv   [N_SB][N_CH],
  input  logic              rx_er   [N_SB][N_CH],
  output logic [WORD_W-1:0] scm_data [N_SB][N_SCM],
  output logic              scm_dv   [N_SB][N_SCM],
  input  logic [15:0]       ecs_addr  [N_SB],
  input  logic              ecs_wr    [N_SB],
  input  logic [31:0]       ecs_wdata [N_SB],
  input  logic              ecs_rd    [N_SB],
  output logic [31:0]       ecs_rdata [N_SB],
  output logic              ecs_rvalid[N_SB]
);
  localparam sb_role_e ROLES [N_SB] = '{ROLE_ELECTRON, ROLE_PHOTON, ROLE_PI0_LOCAL,
                                        ROLE_PI0_GLOBAL, ROLE_HCAL_SLAVE, ROLE_HCAL_SLAVE,
                                        ROLE_HCAL_MASTER, ROLE_SPD};
  localparam int unsigned MASTER = 6;

  partial_t bp_out [N_SB];
  partial_t bp_in  [N_SB][N_SLAVES];

  // backplane: slaves 4 and 5 feed the master; other boards see nothing
  always_comb begin
    for (int b = 0; b < N_SB; b++) begin
      bp_in[b][0] = '0;
      bp_in[b][1] = '0;
    end
    bp_in[MASTER][0] = bp_out[4];
    bp_in[MASTER][1] = bp_out[5];
  end

  for (genvar b = 0; b < N_SB; b++) begin : g_sb
    selection_board #(.ROLE(ROLES[b]), .N_CH(N_CH), .L0_LATENCY(L0_LATENCY)) u_sb (
      .clk, .rst_n, .bcrst, .l0_accept,
      .rx_clk(rx_clk[b]), .rx_data(rx_data[b]), .rx_dv(rx_dv[b]), .rx_er(rx_er[b]),
      .bp_in(bp_in[b]), .bp_out(bp_out[b]),
      .scm_data(scm_data[b]), .scm_dv(scm_dv[b]),
      .ecs_addr(ecs_addr[b]), .ecs_wr(ecs_wr[b]), .ecs_wdata(ecs_wdata[b]), .ecs_rd(ecs_rd[b]),
      .ecs_rdata(ecs_rdata[b]), .ecs_rvalid(ecs_rvalid[b])
    );
  end

endmodule
