// tb_lane_transfer: RAM-to-RAM transfers over one lane.
//
// A block of 320 words (1280 bytes, an event at 15 % occupancy), then one of
// 2048 32-bit words (8192 bytes), is sent as one frame from a source RAM in
// the test, through the lane model (both ends brought up by
// their reset controllers), into the segment-side receiver with its default
// 2048-word buffer. The buffer is read back and compared, and the time from
// SOF leaving to the frame being complete is checked: one word per 100 MHz
// clock, so n + 2 words plus the lane latency: about 3.3 us and 20.6 us.
// The lane model runs on the logic clock here, one word per 100 MHz cycle.
module tb_lane_transfer;
  import cpv_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int N = 2048;

  logic pd, txa, txd, rxa, rxd, pll_lk, cdr, txr, rxr, unused_txr, unused_rxr;
  logic pd2, txa2, txd2, rxa2, rxd2;
  logic [31:0] txdat, rxdat, rdata;
  logic [3:0] txk, rxk, sync, pat;
  logic fvalid, err, rel, up;
  logic [3:0] col;
  logic [15:0] ev, nw, ovr;
  logic [10:0] raddr;

  // transmitting end: its reset controller drives the PLL and transmit resets
  xcvr_reset_ctrl rst_tx (
    .clk, .rst_n, .pll_locked(pll_lk), .rx_is_lockedtodata(1'b1),
    .pll_powerdown(pd), .tx_analogreset(txa), .tx_digitalreset(txd),
    .rx_analogreset(rxa2), .rx_digitalreset(rxd2), .tx_ready(txr), .rx_ready(unused_rxr));
  // receiving end: its reset controller drives the receive resets
  xcvr_reset_ctrl rst_rx (
    .clk, .rst_n, .pll_locked(pll_lk), .rx_is_lockedtodata(cdr),
    .pll_powerdown(pd2), .tx_analogreset(txa2), .tx_digitalreset(txd2),
    .rx_analogreset(rxa), .rx_digitalreset(rxd), .tx_ready(unused_txr), .rx_ready(rxr));

  xcvr_lane_model lane (
    .clk, .pll_powerdown(pd), .tx_analogreset(txa), .tx_digitalreset(txd),
    .pll_locked(pll_lk), .tx_parallel_data(txdat), .tx_datak(txk),
    .rx_analogreset(rxa), .rx_digitalreset(rxd), .rx_is_lockedtodata(cdr),
    .rx_parallel_data(rxdat), .rx_datak(rxk), .rx_syncstatus(sync), .rx_patterndetect(pat));

  assign up = rxr && (sync == 4'hF);

  lane_rx rx (
    .clk, .rst_n, .link_up(up), .rx_parallel_data(rxdat), .rx_datak(rxk),
    .frame_valid(fvalid), .col_id(col), .event_id(ev), .nwords(nw), .err,
    .release_frame(rel), .overruns(ovr), .rd_addr(raddr), .rd_data(rdata));

  logic [31:0] src [N];

  // one frame of n words from the source RAM; checks content and time
  task automatic xfer(input int n, input logic [3:0] c);
    int t0, t1;
    for (int i = 0; i < n; i++) src[i] = $urandom;
    t0 = cyc;
    txdat = {c, 4'h0, 16'd1, K28_1}; txk = DATAK_CTRL; @(negedge clk);
    for (int i = 0; i < n; i++) begin
      txdat = src[i]; txk = DATAK_DATA; @(negedge clk);
    end
    txdat = {8'h00, 16'(n), K28_3}; txk = DATAK_CTRL; @(negedge clk);
    txdat = IDLE_WORD;
    while (!fvalid) @(negedge clk);
    t1 = cyc;
    checks++;
    if (err || nw != 16'(n) || col != c) begin
      failures++; $display("frame: err %0d words %0d col %0d", err, nw, col);
    end
    checks++;
    if (t1 - t0 > n + 2 + 12) begin
      failures++; $display("transfer took %0d cycles", t1 - t0);
    end
    $display("%0d words (%0d bytes) moved in %0d cycles = %0d ns at 100 MHz", n, 4 * n, t1 - t0, (t1 - t0) * 10);
    for (int i = 0; i < n; i++) begin
      raddr = 11'(i);
      @(negedge clk);
      checks++;
      if (rdata != src[i]) begin failures++; $display("word %0d: %h expected %h", i, rdata, src[i]); end
    end
    rel = 1; @(negedge clk); rel = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    txdat = IDLE_WORD; txk = DATAK_CTRL; rel = 0; raddr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!(txr && up)) @(negedge clk);
    repeat (10) @(negedge clk);
    xfer(320, 4'd5);               // 1280 bytes: one event at 15 % occupancy
    xfer(N, 4'd2);                 // 8192 bytes: the full buffer
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
