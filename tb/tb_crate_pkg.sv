// Reference model shared by the Selection Crate and Selection Board
// testbenches: the contents sent on every link, the LUT contents, and the
// results the boards must produce from them, computed independently of the
// RTL.
package tb_crate_pkg;
  import sb_pkg::*;

  localparam int SPD_BOARD = 7;
  localparam int MASTER    = 6;
  localparam int ER_BOARD  = 0, ER_CH = 5, ER_AT = 300;   // er raised on this word
  localparam int BAD_CH    = 3, BAD_AT = 500;             // corrupted pattern word

  function automatic int role_of(input int b);
    case (b)
      4, 5:    return ROLE_HCAL_SLAVE;
      6:       return ROLE_HCAL_MASTER;
      7:       return ROLE_SPD;
      default: return b;
    endcase
  endfunction

  function automatic logic [31:0] mix(input int a, input int b, input int c);
    logic [31:0] x;
    x = 32'(a) * 32'h9E37_79B1 ^ 32'(b) * 32'h85EB_CA77 ^ 32'(c) * 32'hC2B2_AE3D;
    x = x ^ (x >> 15);
    x = x * 32'h2C1B_3C6D;
    x = x ^ (x >> 12);
    return x;
  endfunction

  // Word n sent on link c of board b. Calorimeter links carry
  // {n, local address, energy}; the SPD board's links carry a counter
  // (the comparator test pattern), with one corrupted bit.
  function automatic logic [31:0] link_word(input int b, input int c, input int n);
    logic [31:0] h;
    if (b == SPD_BOARD) begin
      h = 32'(n + c * 1000);
      if (c == BAD_CH && n == BAD_AT) h = h ^ 32'h0000_0100;
      return h;
    end
    h = mix(b, c, n);
    return {16'(n), h[15:8], (n % 5 == 0) ? h[7:0] & 8'h07 : h[7:0]};
  endfunction

  function automatic logic [13:0] lut_val(input int b, input int c, input int a);
    logic [31:0] h;
    h = mix(b + 100, c, a);
    return h[13:0];
  endfunction

  function automatic partial_t own_partial(input int b, input int n, input int nch);
    partial_t p;
    logic [31:0] w;
    p = '0;
    for (int c = 0; c < nch; c++) begin
      w = link_word(b, c, n);
      p.sum += 16'(w[7:0]);
      if (c == 0 || w[7:0] > p.et) begin
        p.et   = w[7:0];
        p.addr = lut_val(b, c, int'(w[15:8]));
      end
    end
    return p;
  endfunction

  function automatic partial_t final_partial(input int b, input int n, input int nch);
    partial_t p, s;
    p = own_partial(b, n, nch);
    if (b == MASTER) begin
      for (int k = 4; k <= 5; k++) begin
        s = own_partial(k, n, nch);
        p.sum += s.sum;
        if (s.et > p.et) begin p.et = s.et; p.addr = s.addr; end
      end
    end
    return p;
  endfunction

  // 32 bit LFSR written bit by bit (taps 31, 21, 1, 0 after the shift)
  function automatic logic [31:0] lfsr_model(input logic [31:0] s);
    logic [31:0] r;
    for (int i = 0; i < 31; i++) r[i] = s[i+1];
    r[31] = s[0];
    if (s[0]) begin r[21] = ~r[21]; r[1] = ~r[1]; r[0] = ~r[0]; end
    return r;
  endfunction

endpackage
