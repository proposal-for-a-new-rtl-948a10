// sync_fifo: single-clock first-word-fall-through FIFO.
//
// In the column controller one instance per group of five Dilogic chips holds
// the 18-bit words read over that group's IOBUS; the proposal sizes it at
// 256 x 18 bits, enough for a fully occupied group (5 x 48 channels plus five
// markers = 245 words). The segment event builder reuses it, 4 deep and 33 bits
// wide, as its output buffer.
//
// Interface: push with wr_en/wr_data, pop with rd_en; rd_data shows the oldest
// word whenever empty is low (no read latency). A push when full and a pop when
// empty are ignored. count gives the fill level. Writes take effect at the next
// rising clock edge; reset (rst_n low, synchronous) empties the FIFO.
// The storage is a plain array with a registered write and a combinational
// read, which is this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 18,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rd_data = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= inc(wr_ptr);
      if (do_rd) rd_ptr <= inc(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // A write into a full FIFO loses data: the producer must watch full/count.
  ap_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full))
    else $error("sync_fifo: write while full");
endmodule
