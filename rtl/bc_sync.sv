// Bunch-crossing synchronisation of the input read-out.
//
// The TTC bunch counter reset (BCRST) is delayed by an ECS-programmed number
// of 40.08 MHz cycles; the delayed pulse starts the read side of all input
// FIFOs at once, so that the words of one bunch crossing from all links are
// read in the same cycle, and clears the local bunch counter. The source gives
// this scheme ("triggered by the BCRST signal ... properly delayed"); the
// counter width, the wrap at 3564 bunches and that a new BCRST restarts a
// pending delay are this design's choices.
// Timing: bcrst_d is high delay+1 cycles after bcrst; read_en and bcid=0 hold
// from the cycle after bcrst_d.
module bc_sync
  import sb_pkg::*;
#(
  parameter int unsigned BX_PER_ORBIT_P = BX_PER_ORBIT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bcrst,
  input  logic [BCID_W-1:0] delay,
  output logic              bcrst_d,
  output logic              read_en,
  output logic [BCID_W-1:0] bcid
);
  logic              pending;
  logic [BCID_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= 1'b0;
      cnt     <= '0;
      bcrst_d <= 1'b0;
      read_en <= 1'b0;
      bcid    <= '0;
    end else begin
      bcrst_d <= 1'b0;
      if (bcrst) begin
        pending <= 1'b1;
        cnt     <= delay;
      end else if (pending) begin
        if (cnt == '0) begin
          pending <= 1'b0;
          bcrst_d <= 1'b1;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
      if (bcrst_d) begin
        read_en <= 1'b1;
        bcid    <= '0;
      end else if (bcid == BCID_W'(BX_PER_ORBIT_P - 1)) begin
        bcid <= '0;
      end else begin
        bcid <= bcid + 1'b1;
      end
    end
  end

endmodule
