// Dual-clock FIFO with Gray-coded pointers.
//
// Carries the rebuilt input words from the recovered 80.156 MHz clock of a
// link into the 40.08 MHz clock of the board, absorbing the variable latency
// of the serializer/deserializer pair. The source calls for asynchronous
// FIFOs here; the Gray-pointer construction, depth and registered read port
// are this design's choices.
// Write: wdata is stored on wclk when wen and not full.
// Read: when ren and not empty, rdata is loaded on the next rclk edge and
// rvalid is high for that cycle. Each pointer crosses through two flops, so
// empty/full are conservative by two cycles of the other clock.
module async_fifo #(
  parameter int unsigned WIDTH = 33,
  parameter int unsigned DEPTH = 16   // power of two
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wen,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             ren,
  output logic [WIDTH-1:0] rdata,
  output logic             rvalid,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen by the writer
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen by the reader
  logic [AW:0] wbin_nx, rbin_nx;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign full    = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_nx = wbin + (AW+1)'(wen && !full);

  always_ff @(posedge wclk) begin
    if (wen && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nx;
      wgray    <= bin2gray(wbin_nx);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  // read side
  assign empty   = (rgray == wgray_r2);
  assign rbin_nx = rbin + (AW+1)'(ren && !empty);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
      rdata <= '0; rvalid <= 1'b0;
    end else begin
      rbin     <= rbin_nx;
      rgray    <= bin2gray(rbin_nx);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      rvalid   <= ren && !empty;
      if (ren && !empty) rdata <= mem[rbin[AW-1:0]];
    end
  end

endmodule
