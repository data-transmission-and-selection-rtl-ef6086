// Highest-energy candidate selection (combinational).
//
// Compares the energies of N candidates and returns the largest with its
// global address and channel number. On equal energies the lowest channel
// wins (a choice of this design). A comparison tree of depth log2(N) is used.
// The caller registers the result.
module max_select
  import sb_pkg::*;
#(
  parameter int unsigned N = N_CH_SB
) (
  input  logic [ET_W-1:0]    et   [N],
  input  logic [GADDR_W-1:0] addr [N],
  output logic [ET_W-1:0]    max_et,
  output logic [GADDR_W-1:0] max_addr,
  output logic [4:0]         max_ch
);
  localparam int unsigned L = (N <= 1) ? 1 : $clog2(N);
  localparam int unsigned P = 1 << L;

  typedef struct packed {
    logic              ok;
    logic [ET_W-1:0]   et;
    logic [GADDR_W-1:0] addr;
    logic [4:0]        ch;
  } cand_t;

  cand_t lvl [L+1][P];

  always_comb begin
    for (int i = 0; i < P; i++) begin
      if (i < N) lvl[0][i] = '{ok: 1'b1, et: et[i], addr: addr[i], ch: 5'(i)};
      else       lvl[0][i] = '0;
    end
    for (int l = 0; l < L; l++) begin
      for (int i = 0; i < P; i++) begin
        if (i < (P >> (l + 1))) begin
          if (!lvl[l][2*i+1].ok ||
              (lvl[l][2*i].ok && lvl[l][2*i].et >= lvl[l][2*i+1].et))
            lvl[l+1][i] = lvl[l][2*i];
          else
            lvl[l+1][i] = lvl[l][2*i+1];
        end else begin
          lvl[l+1][i] = '0;
        end
      end
    end
    max_et   = lvl[L][0].et;
    max_addr = lvl[L][0].addr;
    max_ch   = lvl[L][0].ch;
  end

endmodule
