// tb_xcvr_reset_ctrl: checks the reset order and times of the lane reset
// sequencer with lock inputs driven by the test: power-down length, transmit
// release after PLL lock, receive release only after T_LTD cycles of CDR lock,
// restart of the receive half on CDR loss and of everything on PLL loss.
module tb_xcvr_reset_ctrl;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic pll_locked, cdr;
  logic pd, txa, txd, rxa, rxd, txr, rxr;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  xcvr_reset_ctrl #(.T_PD(100), .T_DIG(20), .T_LTD(400)) dut (
    .clk, .rst_n, .pll_locked, .rx_is_lockedtodata(cdr), .pll_powerdown(pd),
    .tx_analogreset(txa), .tx_digitalreset(txd), .rx_analogreset(rxa),
    .rx_digitalreset(rxd), .tx_ready(txr), .rx_ready(rxr));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL at cycle %0d: %s", cyc, what); end
  endtask

  int t;
  initial begin
    pll_locked = 0; cdr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    t = cyc;
    while (pd) @(negedge clk);
    check(cyc - t >= 99 && cyc - t <= 102, $sformatf("power-down held %0d cycles", cyc - t));
    check(txa && txd && rxa && rxd && !txr && !rxr, "all resets held until PLL lock");
    repeat (30) @(negedge clk);
    check(txa && rxa, "analog resets held without PLL lock");
    pll_locked = 1;
    repeat (4) @(negedge clk);
    check(!txa && txd, "tx analog released first");
    check(!rxa && rxd, "rx analog released after PLL lock");
    t = cyc;
    while (txd) @(negedge clk);
    check(cyc - t >= 19 && cyc - t <= 22, $sformatf("tx digital after %0d cycles", cyc - t));
    check(txr, "tx_ready");
    repeat (50) @(negedge clk);
    check(rxd && !rxr, "rx digital held without CDR lock");
    cdr = 1;
    repeat (200) @(negedge clk);
    cdr = 0;                       // a glitch restarts the lock time
    @(negedge clk);
    cdr = 1;
    t = cyc;
    while (rxd) @(negedge clk);
    check(cyc - t >= 399 && cyc - t <= 403, $sformatf("rx digital %0d cycles after stable lock", cyc - t));
    check(rxr, "rx_ready");
    // CDR loss: receive half restarts, transmit half stays
    cdr = 0;
    repeat (5) @(negedge clk);
    check(rxd && !rxr && txr && !txd, "CDR loss resets the receiver only");
    cdr = 1;
    repeat (410) @(negedge clk);
    check(rxr && !rxd, "receiver back after CDR relock");
    // PLL loss: everything restarts
    pll_locked = 0;
    repeat (5) @(negedge clk);
    check(pd && txa && txd && rxd && !txr && !rxr, "PLL loss restarts the sequence");
    pll_locked = 1;
    repeat (700) @(negedge clk);
    check(txr && rxr, "lane back up after PLL relock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
