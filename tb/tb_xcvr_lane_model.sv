// tb_xcvr_lane_model: checks the lane model as the user logic sees it: PLL
// and CDR lock times, silence while in reset, the word aligner (sync only after
// a K28.5 comma in byte 0), pattern detection, and that every word arrives
// unchanged exactly LAT + 1 cycles after it was sent.
module tb_xcvr_lane_model;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic pd, txa, txd, rxa, rxd, pll_lk, cdr_lk;
  logic [31:0] txdat, rxdat;
  logic [3:0]  txk, rxk, sync, pat;

  xcvr_lane_model #(.LAT(8), .PLL_LOCK(50), .CDR_LOCK(80)) dut (
    .clk, .pll_powerdown(pd), .tx_analogreset(txa), .tx_digitalreset(txd),
    .pll_locked(pll_lk), .tx_parallel_data(txdat), .tx_datak(txk),
    .rx_analogreset(rxa), .rx_digitalreset(rxd), .rx_is_lockedtodata(cdr_lk),
    .rx_parallel_data(rxdat), .rx_datak(rxk), .rx_syncstatus(sync), .rx_patterndetect(pat));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL at cycle %0d: %s", cyc, what); end
  endtask

  // sent words, indexed by cycle, for the latency check
  logic [35:0] sent [int];
  int t;
  initial begin
    pd = 1; txa = 1; txd = 1; rxa = 1; rxd = 1;
    txdat = 32'hAA5507BC; txk = 4'b0000;   // no comma yet
    repeat (5) @(negedge clk);
    pd = 0;
    t = cyc;
    while (!pll_lk) @(negedge clk);
    check(cyc - t >= 50 && cyc - t <= 53, $sformatf("PLL lock after %0d cycles", cyc - t));
    txa = 0; txd = 0; rxa = 0;
    t = cyc;
    while (!cdr_lk) @(negedge clk);
    check(cyc - t >= 80 && cyc - t <= 83, $sformatf("CDR lock after %0d cycles", cyc - t));
    repeat (20) @(negedge clk);
    check(rxdat == 0 && sync == 0, "receiver silent during rx_digitalreset");
    rxd = 0;
    repeat (20) @(negedge clk);
    check(rxdat == 32'hAA5507BC && sync == 4'h0, "data passes but no sync without a comma");
    txk = 4'b0001;                           // the fill word now carries K28.5
    repeat (12) @(negedge clk);
    check(sync == 4'hF, "word aligner synchronised on K28.5");
    check(pat == 4'b0001, "pattern detected in byte 0");
    // random traffic with latency check
    for (int i = 0; i < 300; i++) begin
      txdat = $urandom;
      txk   = ($urandom % 5 == 0) ? 4'b0001 : 4'b0000;
      sent[cyc] = {txk, txdat};
      if (sent.exists(cyc - 9)) begin
        check({rxk, rxdat} == sent[cyc - 9], $sformatf("word sent at %0d", cyc - 9));
      end
      @(negedge clk);
    end
    rxd = 1;
    repeat (2) @(negedge clk);
    check(sync == 0 && rxdat == 0, "rx_digitalreset clears sync and data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
