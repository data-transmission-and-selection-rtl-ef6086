// ECS register bank of a Selection Board.
//
// The board is configured and monitored by the experiment control system
// through an on-board credit-card PC and a PCI bridge; this block is the
// board side of that path: a simple synchronous register bus (one access per
// cycle, ecs_wr or ecs_rd for one cycle). The bus protocol and register map
// are this design's; the source lists what the ECS must reach: register
// settings, LUT loading, diagnostic FIFOs, pattern generator and comparator.
//
// Register map (32 bit words, address in ecs_addr):
//   0x0000 R   ID: 0x5B00 in [31:16], board role in [2:0]
//   0x0001 RW  BCRST delay [11:0]
//   0x0002 RW  control: [0] generator on, [2:1] generator mode,
//              [3] comparator on, [5:4] comparator mode
//   0x0003 RW  pattern word (fixed word / seed)
//   0x0004 W   commands: [0] arm diagnostic FIFOs, [1] arm debug FIFOs,
//              [2] clear counters (self-clearing pulses)
//   0x0005 R   {overflow count[15:0], 9'b0, running, queue occupancy[5:0]}
//   0x0006 R   accepted events   0x0007 R   current bunch id
//   0x01cc R   channel cc: {framing faults[15:0], er words[15:0]}
//   0x02cc R   channel cc: {FIFO overflows, FIFO underflows}
//   0x03cc / 0x04cc / 0x05cc R  comparator cc: words [31:0] / wrong words /
//              wrong bits     0x0Acc R  comparator cc: words [47:32]
//   0x06cc R   pop diagnostic FIFO cc      0x07cc R  its fill count
//   0x080k R   pop debug FIFO k (0..2)     0x090k R  its fill count
//   0x2000 | ch<<8 | local  RW  address LUT entry
// Timing: write takes effect at the clock edge of ecs_wr; read data is on
// ecs_rdata with ecs_rvalid two cycles after ecs_rd.
module ecs_regs
  import sb_pkg::*;
#(
  parameter sb_role_e    ROLE = ROLE_ELECTRON,
  parameter int unsigned N_CH = N_CH_SB
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [15:0]        ecs_addr,
  input  logic               ecs_wr,
  input  logic [31:0]        ecs_wdata,
  input  logic               ecs_rd,
  output logic [31:0]        ecs_rdata,
  output logic               ecs_rvalid,
  // configuration
  output logic [BCID_W-1:0]  bcrst_delay,
  output logic               gen_en,
  output pat_mode_e          gen_mode,
  output logic               chk_en,
  output pat_mode_e          chk_mode,
  output logic [WORD_W-1:0]  pattern,
  output logic               diag_arm,
  output logic               dbg_arm,
  output logic               cnt_clr,
  // LUT
  output logic               lut_we,
  output logic [4:0]         lut_ch,
  output logic [LADDR_W-1:0] lut_addr,
  output logic [GADDR_W-1:0] lut_wdata,
  input  logic [GADDR_W-1:0] lut_rdata,
  // FIFOs
  output logic               diag_pop [N_CH],
  input  logic [WORD_W-1:0]  diag_dout [N_CH],
  input  logic [8:0]         diag_count [N_CH],
  output logic               dbg_pop [N_SCM],
  input  logic [WORD_W-1:0]  dbg_dout [N_SCM],
  input  logic [8:0]         dbg_count [N_SCM],
  // status
  input  logic [15:0]        err_cnt [N_CH],
  input  logic [15:0]        align_cnt [N_CH],
  input  logic [15:0]        overflow_cnt [N_CH],
  input  logic [15:0]        underflow_cnt [N_CH],
  input  logic [47:0]        chk_words [N_CH],
  input  logic [31:0]        chk_werr [N_CH],
  input  logic [31:0]        chk_berr [N_CH],
  input  logic [5:0]         dr_occupancy,
  input  logic [15:0]        dr_accepts,
  input  logic [15:0]        dr_overflows,
  input  logic               running,
  input  logic [BCID_W-1:0]  bcid
);
  logic [15:0] a1;
  logic        rd1;
  logic [5:0]  ctrl;
  logic [31:0] mux;

  wire  [7:0]  sub = ecs_addr[7:0];
  wire         is_lut = (ecs_addr[15:13] == 3'b001);

  assign lut_ch    = ecs_addr[12:8];
  assign lut_addr  = ecs_addr[7:0];
  assign lut_wdata = ecs_wdata[GADDR_W-1:0];
  assign lut_we    = ecs_wr && is_lut;

  assign gen_en   = ctrl[0];
  assign gen_mode = pat_mode_e'(ctrl[2:1]);
  assign chk_en   = ctrl[3];
  assign chk_mode = pat_mode_e'(ctrl[5:4]);

  always_comb begin
    for (int c = 0; c < N_CH; c++)
      diag_pop[c] = ecs_rd && ecs_addr[15:8] == 8'h06 && sub == 8'(c);
    for (int k = 0; k < N_SCM; k++)
      dbg_pop[k] = ecs_rd && ecs_addr[15:8] == 8'h08 && sub == 8'(k);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcrst_delay <= '0;
      ctrl        <= '0;
      pattern     <= '0;
      diag_arm    <= 1'b0;
      dbg_arm     <= 1'b0;
      cnt_clr     <= 1'b0;
    end else begin
      diag_arm <= 1'b0;
      dbg_arm  <= 1'b0;
      cnt_clr  <= 1'b0;
      if (ecs_wr) begin
        case (ecs_addr)
          16'h0001: bcrst_delay <= ecs_wdata[BCID_W-1:0];
          16'h0002: ctrl        <= ecs_wdata[5:0];
          16'h0003: pattern     <= ecs_wdata;
          16'h0004: begin
            diag_arm <= ecs_wdata[0];
            dbg_arm  <= ecs_wdata[1];
            cnt_clr  <= ecs_wdata[2];
          end
          default: ;
        endcase
      end
    end
  end

  // read: address registered, then data registered
  always_comb begin
    logic [7:0] s;
    logic [4:0] si;
    s   = a1[7:0];
    si  = a1[4:0];
    mux = '0;
    if (a1[15:13] == 3'b001) begin
      mux = 32'(lut_rdata);
    end else begin
      case (a1[15:8])
        8'h00: case (s)
          8'h00: mux = {16'h5B00, 13'd0, ROLE};
          8'h01: mux = 32'(bcrst_delay);
          8'h02: mux = 32'(ctrl);
          8'h03: mux = pattern;
          8'h05: mux = {dr_overflows, 9'd0, running, dr_occupancy};
          8'h06: mux = 32'(dr_accepts);
          8'h07: mux = 32'(bcid);
          default: mux = '0;
        endcase
        8'h01: if (s < 8'(N_CH)) mux = {align_cnt[si], err_cnt[si]};
        8'h02: if (s < 8'(N_CH)) mux = {overflow_cnt[si], underflow_cnt[si]};
        8'h03: if (s < 8'(N_CH)) mux = chk_words[si][31:0];
        8'h04: if (s < 8'(N_CH)) mux = chk_werr[si];
        8'h05: if (s < 8'(N_CH)) mux = chk_berr[si];
        8'h06: if (s < 8'(N_CH)) mux = diag_dout[si];
        8'h07: if (s < 8'(N_CH)) mux = 32'(diag_count[si]);
        8'h08: if (s < 8'(N_SCM)) mux = dbg_dout[si[1:0]];
        8'h09: if (s < 8'(N_SCM)) mux = 32'(dbg_count[si[1:0]]);
        8'h0A: if (s < 8'(N_CH)) mux = 32'(chk_words[si][47:32]);
        default: mux = '0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a1 <= '0; rd1 <= 1'b0; ecs_rdata <= '0; ecs_rvalid <= 1'b0;
    end else begin
      a1         <= ecs_addr;
      rd1        <= ecs_rd;
      ecs_rvalid <= rd1;
      if (rd1) ecs_rdata <= mux;
    end
  end

  // one access per cycle
  a_one_access: assert property (@(posedge clk) disable iff (!rst_n) !(ecs_rd && ecs_wr));

endmodule
