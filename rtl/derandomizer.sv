// De-randomizer buffer towards TELL1.
//
// Every bunch crossing the board presents one record of N_WORDS 32 bit words
// (its input and output data). Records wait L0_LATENCY cycles in a circular
// latency memory until the L0 decision for that crossing arrives. On
// l0_accept the record leaving the latency memory is copied into the event
// queue, which holds up to N_EVENTS (16) events; the queue is emptied one word
// per cycle, so an event of 36 words takes 36 x 24.95 ns = 898 ns, inside the
// 900 ns the source allows. Events follow each other back to back.
// Source: 36 words of 32 bit, at most 16 consecutive accepted events, 900 ns.
// This design's choices: the latency memory and its depth (4 us of LHCb L0
// latency, 160 crossings), a 12 bit L0 event number written into bits [23:12]
// of word 0, and dropping (and counting) an accept that finds the queue full.
// Timing: l0_accept in cycle t refers to the record presented in cycle
// t - L0_LATENCY; its word 0 leaves on tx_data at t+1 at the earliest.
module derandomizer
  import sb_pkg::*;
#(
  parameter int unsigned N_WORDS    = 36,
  parameter int unsigned N_EVENTS   = 16,
  parameter int unsigned L0_LATENCY = 160
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [WORD_W-1:0] rec [N_WORDS],
  input  logic              l0_accept,
  input  logic              clr,
  output logic [WORD_W-1:0] tx_data,
  output logic              tx_dv,
  output logic              tx_first,
  output logic [5:0]        occupancy,
  output logic [15:0]       accept_cnt,
  output logic [15:0]       overflow_cnt
);
  localparam int unsigned LW = (L0_LATENCY <= 1) ? 1 : $clog2(L0_LATENCY);
  localparam int unsigned EW = $clog2(N_EVENTS);
  localparam int unsigned WW = $clog2(N_WORDS);

  typedef logic [WORD_W-1:0] rec_t [N_WORDS];

  logic [WORD_W-1:0] lat_mem [L0_LATENCY][N_WORDS];
  logic [LW-1:0]     lat_ptr;
  logic [WORD_W-1:0] ev_mem  [N_EVENTS][N_WORDS];
  logic [EW-1:0]     ev_wr, ev_rd;
  logic [WW-1:0]     widx;
  logic [11:0]       ev_num;
  logic              sending, last_word, store;

  assign last_word = sending && (widx == WW'(N_WORDS - 1));
  assign store     = l0_accept && (occupancy < 6'(N_EVENTS));

  // latency memory: read the oldest record before overwriting it
  always_ff @(posedge clk) begin
    for (int w = 0; w < N_WORDS; w++) lat_mem[lat_ptr][w] <= rec[w];
    if (store) begin
      for (int w = 0; w < N_WORDS; w++) ev_mem[ev_wr][w] <= lat_mem[lat_ptr][w];
      ev_mem[ev_wr][0][23:12] <= ev_num;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lat_ptr      <= '0;
      ev_wr        <= '0;
      ev_rd        <= '0;
      widx         <= '0;
      ev_num       <= '0;
      sending      <= 1'b0;
      occupancy    <= '0;
      accept_cnt   <= '0;
      overflow_cnt <= '0;
      tx_data      <= '0;
      tx_dv        <= 1'b0;
      tx_first     <= 1'b0;
    end else begin
      lat_ptr <= (lat_ptr == LW'(L0_LATENCY - 1)) ? '0 : lat_ptr + 1'b1;

      if (l0_accept) begin
        ev_num <= ev_num + 1'b1;
        if (store) begin
          ev_wr      <= ev_wr + 1'b1;
          accept_cnt <= accept_cnt + 1'b1;
        end else begin
          overflow_cnt <= overflow_cnt + 1'b1;
        end
      end
      if (clr) begin
        accept_cnt   <= '0;
        overflow_cnt <= '0;
      end

      occupancy <= occupancy + 6'(store) - 6'(last_word);

      // output: one word per cycle while an event is queued
      tx_dv    <= sending;
      tx_first <= sending && (widx == '0);
      if (sending) tx_data <= ev_mem[ev_rd][widx];
      else         tx_data <= '0;

      if (sending) begin
        if (last_word) begin
          widx    <= '0;
          ev_rd   <= ev_rd + 1'b1;
          sending <= (occupancy > 6'd1) || store;
        end else begin
          widx <= widx + 1'b1;
        end
      end else if (occupancy != '0 || store) begin
        sending <= 1'b1;
      end
    end
  end

endmodule
