// lane_sync: clock-domain adapter between the readout logic and one
// transceiver lane.
//
// The logic runs on the 100 MHz system clock; the transceiver's parallel side
// runs on its own clock (78.125 MHz for a 3.125 Gb/s 8b/10b lane with a 32-bit
// word). Two dual-clock FIFOs (async_fifo) carry the words across.
//
// Transmit: every word the logic offers on tx_in is written to the FIFO except
// fill words, which are dropped. tx_adv is high while the FIFO has room; the
// logic must hold tx_in until a cycle where tx_adv is high. On the transceiver
// side a word is taken from the FIFO every cycle, and the fill word (with its
// K28.5 comma) is sent whenever the FIFO is empty. Fill words are therefore
// the rate-matching padding of the lane, which the frame format allows
// anywhere.
//
// Receive: words arriving while the word aligner reports all bytes in sync
// are registered and written to the FIFO, again without fill words. On the
// logic side a word is read every cycle; when the FIFO is empty rx_out shows
// the fill word. Since the logic clock is the faster one, the receive FIFO
// cannot fill up. rx_sync is the aligner status brought into the logic clock
// through two flip-flops.
//
// Each side's reset is rst_n synchronised to that side's clock. The two
// reset synchronisers are the only flip-flops that take rst_n asynchronously
// (asserted at once, released on a clock edge), because the transceiver
// clock may not be running when reset is asserted; elsewhere rst_n is a
// synchronous reset.
//
// From the proposal: synchronisation FIFOs between the user logic and the
// serialisers in both directions. Dropping and reinserting fill words for
// rate matching is this design's choice.
module lane_sync
  import cpv_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  // logic side
  input  logic          clk,
  input  logic          rst_n,
  input  lane_word_t    tx_in,
  output logic          tx_adv,
  output lane_word_t    rx_out,
  output logic          rx_sync,
  // transceiver side
  input  logic          xcvr_clk,
  output logic [LW-1:0] tx_parallel_data,
  output logic [KW-1:0] tx_datak,
  input  logic [LW-1:0] rx_parallel_data,
  input  logic [KW-1:0] rx_datak,
  input  logic [KW-1:0] rx_syncstatus
);
  localparam lane_word_t FILL = '{data: IDLE_WORD, datak: DATAK_CTRL};
  localparam int unsigned WW = LW + KW;

  function automatic logic is_fill(input lane_word_t w);
    return w == FILL;
  endfunction

  logic [1:0] xrst_sync, lrst_sync, sync_s;
  logic       xrst_n, lrst_n;

  always_ff @(posedge xcvr_clk or negedge rst_n) begin
    if (!rst_n) xrst_sync <= '0;
    else        xrst_sync <= {xrst_sync[0], 1'b1};
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lrst_sync <= '0;
    else        lrst_sync <= {lrst_sync[0], 1'b1};
  end
  assign xrst_n = xrst_sync[1];
  assign lrst_n = lrst_sync[1];

  // ---------------- transmit ----------------
  logic            tx_full, tx_empty;
  logic [WW-1:0]   tx_rdata;

  async_fifo #(.WIDTH(WW), .DEPTH(DEPTH)) u_txf (
    .wclk(clk), .wrst_n(lrst_n),
    .wr_en(!is_fill(tx_in)), .wr_data(tx_in), .full(tx_full),
    .rclk(xcvr_clk), .rrst_n(xrst_n),
    .rd_en(1'b1), .rd_data(tx_rdata), .empty(tx_empty)
  );
  assign tx_adv = !tx_full && lrst_n;

  always_ff @(posedge xcvr_clk) begin
    if (!xrst_n || tx_empty) {tx_parallel_data, tx_datak} <= FILL;
    else                     {tx_parallel_data, tx_datak} <= tx_rdata;
  end

  // ---------------- receive ----------------
  lane_word_t    rx_q;
  logic          rx_q_ok;
  logic          rx_empty;
  logic [WW-1:0] rx_rdata;

  always_ff @(posedge xcvr_clk) begin
    if (!xrst_n) begin
      rx_q    <= FILL;
      rx_q_ok <= 1'b0;
    end else begin
      rx_q    <= '{data: rx_parallel_data, datak: rx_datak};
      rx_q_ok <= &rx_syncstatus;
    end
  end

  async_fifo #(.WIDTH(WW), .DEPTH(DEPTH)) u_rxf (
    .wclk(xcvr_clk), .wrst_n(xrst_n),
    .wr_en(rx_q_ok && !is_fill(rx_q)), .wr_data(rx_q), .full(),
    .rclk(clk), .rrst_n(lrst_n),
    .rd_en(1'b1), .rd_data(rx_rdata), .empty(rx_empty)
  );

  always_ff @(posedge clk) begin
    if (!lrst_n) begin
      rx_out  <= FILL;
      sync_s  <= '0;
    end else begin
      rx_out  <= rx_empty ? FILL : lane_word_t'(rx_rdata);
      sync_s  <= {sync_s[0], &rx_syncstatus};
    end
  end
  assign rx_sync = sync_s[1];
endmodule
