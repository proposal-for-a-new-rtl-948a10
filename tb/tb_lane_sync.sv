// tb_lane_sync: one clock-domain adapter with its transceiver side looped
// back (transmit words fed straight into the receive port). The logic side
// offers a dense random stream of payload, control and fill words, holding a
// word while tx_adv is low. Checks: the non-fill words come back on rx_out in
// order and complete, fill words are dropped on the way in and inserted on
// the lane when there is nothing to send, the faster logic side is held back
// by tx_adv, rx_sync follows the aligner status with a short delay, and words
// arriving while the aligner is out of sync are discarded.
module tb_lane_sync;
  import cpv_pkg::*;
  logic clk = 1'b0, xclk = 1'b0;
  always #25 clk = ~clk;              // 100 MHz logic
  always #32 xclk = ~xclk;            // 78.125 MHz lane
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  localparam lane_word_t FILL = '{data: IDLE_WORD, datak: DATAK_CTRL};

  lane_word_t tx_in, rx_out;
  logic tx_adv, rx_sync;
  logic [LW-1:0] xd;
  logic [KW-1:0] xk;
  logic [KW-1:0] syncst;

  lane_sync dut (
    .clk, .rst_n, .tx_in, .tx_adv, .rx_out, .rx_sync,
    .xcvr_clk(xclk), .tx_parallel_data(xd), .tx_datak(xk),
    .rx_parallel_data(xd), .rx_datak(xk), .rx_syncstatus(syncst));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  lane_word_t refq[$];
  int sent = 0, got = 0, held = 0, lane_fill = 0;
  bit sending = 0;

  // logic-side source: a new word whenever the last one was consumed
  always @(posedge clk) if (rst_n && sending && tx_adv) begin
    if (tx_in != FILL) begin
      refq.push_back(tx_in);
      sent++;
    end
  end
  always @(posedge clk) if (rst_n && sending && !tx_adv) held++;
  int kind;
  always @(negedge clk) if (sending && tx_adv) begin
    kind = $urandom_range(0, 5);
    case (kind)
      0:       tx_in <= FILL;
      1:       tx_in <= '{data: {8'h00, 16'($urandom), K28_0}, datak: DATAK_CTRL};
      default: tx_in <= '{data: $urandom, datak: DATAK_DATA};
    endcase
  end

  always @(posedge xclk) if (rst_n && {xd, xk} == FILL) lane_fill++;

  always @(posedge clk) if (rst_n && rx_out != FILL) begin
    checks++;
    if (refq.size() == 0 || rx_out !== refq[0]) begin
      failures++;
      $display("word %0d: got %h/%b", got, rx_out.data, rx_out.datak);
    end
    if (refq.size() != 0) void'(refq.pop_front());
    got++;
  end

  int t;
  initial begin
    tx_in = FILL; syncst = 4'h0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    check(!rx_sync, "rx_sync low while the aligner is out of sync");
    check(lane_fill > 10, "fill words on an idle lane");
    syncst = 4'hF;
    t = 0;
    while (!rx_sync) begin @(negedge clk); t++; end
    check(t <= 4, $sformatf("rx_sync after %0d cycles", t));
    // dense traffic
    sending = 1;
    repeat (3000) @(negedge clk);
    sending = 0;
    tx_in = FILL;
    repeat (60) @(negedge clk);
    check(refq.size() == 0 && got == sent && sent > 2000,
          $sformatf("sent %0d, received %0d, %0d missing", sent, got, refq.size()));
    check(held > 50, $sformatf("logic side held back %0d cycles", held));
    // out of sync: words are discarded
    syncst = 4'h7;
    repeat (10) @(negedge clk);
    check(!rx_sync, "rx_sync drops with the aligner");
    tx_in = '{data: 32'h12345678, datak: DATAK_DATA};
    @(negedge clk);
    tx_in = FILL;
    repeat (40) @(negedge clk);
    check(got == sent, "word sent while out of sync is discarded");
    refq.delete();
    $display("%0d words looped back, logic side held %0d cycles", got, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
