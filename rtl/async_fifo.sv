// async_fifo: dual-clock FIFO for crossing between the logic clock and a
// transceiver's parallel clock.
//
// Classic design: binary read and write pointers one bit wider than the
// address, converted to Gray code and passed to the other clock domain through
// two-flop synchronisers. The writer compares its pointer with the
// synchronised read pointer to produce full; the reader compares with the
// synchronised write pointer to produce empty. Both flags are therefore
// pessimistic for two cycles of the other clock after a change, never
// optimistic, so nothing is lost or read twice.
//
// Interface: write side (wclk, wrst_n, wr_en, wr_data, full); read side
// (rclk, rrst_n, rd_en, rd_data, empty), first-word-fall-through: rd_data
// shows the oldest word whenever empty is low. DEPTH must be a power of two.
// Each side's reset must be synchronous to its own clock.
//
// The proposal states that synchronisation FIFOs sit between the user logic
// and the serialisers in both directions; their depth (16) and construction
// are this design's choice.
module async_fifo #(
  parameter int unsigned WIDTH = 36,
  parameter int unsigned DEPTH = 16
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
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

  // write domain
  assign full    = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wbin_nx = wbin + (AW+1)'(wr_en && !full);

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nx;
      wgray    <= bin2gray(wbin_nx);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  // read domain
  assign empty   = (rgray == wgray_r2);
  assign rbin_nx = rbin + (AW+1)'(rd_en && !empty);
  assign rd_data = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nx;
      rgray    <= bin2gray(rbin_nx);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
endmodule
