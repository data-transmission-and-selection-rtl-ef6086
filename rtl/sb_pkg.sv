// Shared types and constants of the L0 calorimeter Selection Board (SB).
//
// The SB receives one 32 bit candidate word per bunch crossing (BC, 40.08 MHz)
// on each of its 28 optical inputs, translates the 8 bit local cluster address
// of each candidate into a 14 bit global address, selects the candidate with
// the highest energy, sums the energies, and sends the results to the L0
// Decision Unit (L0DU) and, for L0-accepted events, 36 words to TELL1.
//
// Input word layout (a choice of this design; the source only fixes the 8 bit
// local address and the 32 bit word size):
//   [7:0]   transverse energy (or, on the SPD board, the hit count)
//   [15:8]  local cluster address as defined by the front-end board
//   [31:16] not used by the selection, carried into the TELL1 record
package sb_pkg;

  localparam int unsigned WORD_W   = 32;  // link word, 32 bit per BC
  localparam int unsigned HALF_W   = 16;  // TLK2501 parallel word
  localparam int unsigned ET_W     = 8;
  localparam int unsigned LADDR_W  = 8;   // local address from the FE boards
  localparam int unsigned GADDR_W  = 14;  // global address after the LUT
  localparam int unsigned SUM_W    = 16;  // energy sum / multiplicity
  localparam int unsigned BCID_W   = 12;
  localparam int unsigned N_CH_SB  = 28;  // inputs connected per board
  localparam int unsigned N_SCM    = 3;   // single-channel transmitters per SB
  localparam int unsigned N_SB     = 8;   // boards in the crate
  localparam int unsigned N_SLAVES = 2;   // HCAL slaves feeding the master
  localparam int unsigned BX_PER_ORBIT = 3564;

  // Firmware personality of a board: all SBs have the same hardware.
  typedef enum logic [2:0] {
    ROLE_ELECTRON    = 3'd0,
    ROLE_PHOTON      = 3'd1,
    ROLE_PI0_LOCAL   = 3'd2,
    ROLE_PI0_GLOBAL  = 3'd3,
    ROLE_HCAL_SLAVE  = 3'd4,
    ROLE_HCAL_MASTER = 3'd5,
    ROLE_SPD         = 3'd6
  } sb_role_e;

  // Result of one board for one BC: best candidate and sum.
  typedef struct packed {
    logic [ET_W-1:0]    et;
    logic [GADDR_W-1:0] addr;
    logic [SUM_W-1:0]   sum;
  } partial_t;

  // Test pattern kinds of the link test generator and comparator.
  typedef enum logic [1:0] {
    PAT_FIXED = 2'd0,
    PAT_COUNT = 2'd1,
    PAT_PRBS  = 2'd2
  } pat_mode_e;

  // One step of a 32 bit Galois LFSR, x^32 + x^22 + x^2 + x + 1.
  function automatic logic [WORD_W-1:0] prbs_next(input logic [WORD_W-1:0] s);
    logic [WORD_W-1:0] t;
    t = s >> 1;
    if (s[0]) t = t ^ 32'h8020_0003;
    return t;
  endfunction

  // Next expected word of a pattern.
  function automatic logic [WORD_W-1:0] pat_next(input pat_mode_e m,
                                                 input logic [WORD_W-1:0] cur,
                                                 input logic [WORD_W-1:0] fixed);
    case (m)
      PAT_COUNT: return cur + 1'b1;
      PAT_PRBS:  return prbs_next(cur);
      default:   return fixed;
    endcase
  endfunction

  // L0DU word 0: best candidate; word 1: sum.
  function automatic logic [WORD_W-1:0] l0du_word0(input logic [BCID_W-1:0] bcid,
                                                   input partial_t p);
    return {bcid[7:0], 2'b00, p.addr, p.et};
  endfunction
  function automatic logic [WORD_W-1:0] l0du_word1(input logic [BCID_W-1:0] bcid,
                                                   input partial_t p);
    return {bcid, 4'h0, p.sum};
  endfunction

endpackage
