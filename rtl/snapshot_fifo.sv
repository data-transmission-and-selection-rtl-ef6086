// Diagnostic / debug snapshot FIFO.
//
// Used for the diagnostic FIFOs of the input channels (256 consecutive
// events each) and for the three 32 x 256 debug FIFOs on the outputs of the
// trigger processing. An ECS command (arm) empties the FIFO and starts a
// recording; every cycle with din_valid stores one word until DEPTH words
// are held, then recording stops so that the snapshot is a run of
// consecutive events. The ECS then pops the words one by one.
// Source: sizes and purpose. This design's choices: the arm/stop scheme and
// that pops do not restart the recording.
// Timing: dout is loaded on the clock edge of a pop (valid the next cycle).
module snapshot_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    arm,
  input  logic [WIDTH-1:0]        din,
  input  logic                    din_valid,
  input  logic                    pop,
  output logic [WIDTH-1:0]        dout,
  output logic [$clog2(DEPTH):0]  count,
  output logic                    recording
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      written;
  logic             do_wr, do_rd;

  assign do_wr = recording && din_valid;
  assign do_rd = pop && (count != '0) && !arm;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0; written <= '0;
      recording <= 1'b0; dout <= '0;
    end else if (arm) begin
      wp <= '0; rp <= '0; count <= '0; written <= '0;
      recording <= 1'b1;
    end else begin
      if (do_wr) begin
        wp      <= wp + 1'b1;
        written <= written + 1'b1;
        if (written == (AW+1)'(DEPTH - 1)) recording <= 1'b0;
      end
      if (do_rd) begin
        dout <= mem[rp];
        rp   <= rp + 1'b1;
      end
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

endmodule
