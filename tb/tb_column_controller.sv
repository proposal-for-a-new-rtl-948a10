// tb_column_controller: one column controller with two five-chip chain
// models. The test plays the segment side of the lane: it waits for the reset
// sequence, sends readout commands (K28.0 with event number) and decodes the
// frame the column sends back. Checks every payload word against the hit
// pattern of Dilogic 1-10, the EOF count, that both groups were read in
// parallel (the readout lasts about as long as the larger group, not the sum),
// and that a command sent while the column is busy is dropped and counted.
// The frame arrives as one burst after the readout, from the column RAM.
// The lane side runs on its own clock, 1.28 times slower than the logic clock
// (78.125 MHz against 100 MHz).
module tb_column_controller;
  import cpv_pkg::*;
  import tb_dil_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic xclk = 1'b0;
  always #25 clk = ~clk;
  always #32 xclk = ~xclk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic pd, txa, txd, rxa, rxd, pll_lk, cdr;
  logic [31:0] txdat, rxdat;
  logic [3:0] txk, rxk, rxs;
  logic [1:0] en_in_n, strin_n, en_out;
  logic [DIL_W-1:0] iobus [2];
  logic link_up, busy;
  logic [15:0] events, frames, dropped;
  logic [31:0] stalls, fills;
  int unsigned nh [2][5];
  int unsigned seed;
  int unsigned perr [2];
  int unsigned strb [2];

  column_controller #(.COL_ID(4'd6)) dut (
    .clk, .rst_n, .xcvr_clk(xclk), .pll_powerdown(pd), .tx_analogreset(txa), .tx_digitalreset(txd),
    .rx_analogreset(rxa), .rx_digitalreset(rxd), .pll_locked(pll_lk), .rx_is_lockedtodata(cdr),
    .tx_parallel_data(txdat), .tx_datak(txk), .rx_parallel_data(rxdat), .rx_datak(rxk),
    .rx_syncstatus(rxs), .dil_en_in_n(en_in_n), .dil_strin_n(strin_n), .dil_iobus(iobus),
    .dil_en_out(en_out), .link_up, .busy, .events, .frames, .cmd_dropped(dropped),
    .fifo_stalls(stalls), .fill_in_frame(fills));

  for (genvar g = 0; g < 2; g++) begin : g_ch
    dilogic_chain_model #(.FIRST_CHIP(1 + 5 * g)) chain (
      .clk, .en_in_n(en_in_n[g]), .strin_n(strin_n[g]), .iobus(iobus[g]),
      .en_out_last(en_out[g]), .nhits(nh[g]), .seed, .proto_errors(perr[g]), .strobes(strb[g]));
  end

  // PHY stand-in: PLL locks 20 cycles after power-up, CDR as soon as released
  int pll_cnt;
  always @(posedge xclk) begin
    pll_cnt <= pd ? 0 : pll_cnt + 1;
    pll_lk  <= !pd && pll_cnt > 20;
    cdr     <= !rxa;
  end
  assign rxs = rxd ? 4'h0 : 4'hF;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL at %0d: %s", cyc, what); end
  endtask

  logic [31:0] expq[$];
  int got, frame_end, sof_seen;
  logic [15:0] ev_exp;
  always @(posedge xclk) if (rst_n && !txd) begin
    if (txk == DATAK_CTRL && txdat[7:0] == K28_1) begin
      check(txdat[31:28] == 4'd6 && txdat[23:8] == ev_exp, $sformatf("SOF %h", txdat));
      got <= 0; sof_seen <= 1;
    end else if (txk == DATAK_CTRL && txdat[7:0] == K28_3) begin
      check(txdat[23:8] == 16'(expq.size()) && got == expq.size(),
            $sformatf("EOF %h after %0d words, expected %0d", txdat, got, expq.size()));
      frame_end <= cyc;
    end else if (txk == DATAK_DATA) begin
      check(got < expq.size() && txdat == expq[got], $sformatf("payload %0d %h", got, txdat));
      got <= got + 1;
    end
  end

  task automatic command(input logic [15:0] ev);
    @(negedge xclk);
    rxdat = {8'h00, ev, K28_0}; rxk = DATAK_CTRL;
    @(negedge xclk);
    rxdat = IDLE_WORD;
  endtask

  task automatic run(input int unsigned s, input int unsigned m0, input int unsigned m1, input logic [15:0] ev);
    int t0, wmax, tread;
    int unsigned w [2];
    seed = s;
    expq.delete();
    for (int g = 0; g < 2; g++) begin
      w[g] = 0;
      for (int c = 0; c < 5; c++) begin
        int unsigned chip;
        chip = 1 + 5 * g + c;
        nh[g][c] = nhits_of(s, chip, (g != 0) ? m1 : m0);
        w[g] += nh[g][c] + 1;
        for (int k = 0; k < int'(nh[g][c]); k++)
          expq.push_back({4'd6, 4'(chip), 6'b0, hit_word(s, chip, k)});
        expq.push_back({4'd6, 4'(chip), 6'b0, make_marker(4'(chip), 6'(nh[g][c]))});
      end
    end
    ev_exp = ev;
    sof_seen = 0;
    t0 = cyc;
    command(ev);
    repeat (50) @(negedge clk);
    command(ev + 16'd100);          // arrives while busy: dropped
    while (!busy) @(negedge clk);
    while (busy) @(negedge clk);
    repeat (40) @(negedge clk);     // the tail of the frame is still crossing to the lane
    wmax = int'((w[0] > w[1]) ? w[0] : w[1]);
    check(sof_seen == 1, "frame started");
    // the frame leaves the column RAM after the readout, as a burst at the
    // lane rate (1.28 logic cycles per word); take that off before judging
    // the readout time
    tread = frame_end - t0 - int'(w[0] + w[1] + 2) * 32 / 25;
    check(tread < wmax * 40 / 3 + 100 && tread < int'(w[0] + w[1]) * 40 / 3,
          $sformatf("groups of %0d and %0d words read in %0d cycles: not parallel", w[0], w[1], tread));
  endtask

  initial begin
    rxdat = IDLE_WORD; rxk = DATAK_CTRL; seed = 0; got = 0; frame_end = 0; sof_seen = 0;
    for (int g = 0; g < 2; g++) for (int c = 0; c < 5; c++) nh[g][c] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    command(16'd5);                 // before the link is up: ignored
    while (!link_up) @(negedge clk);
    check(events == 0, "command before link up ignored");
    repeat (5) @(negedge clk);
    run(31, 7, 7, 16'd1);
    run(32, 2, 12, 16'd2);
    run(33, 48, 0, 16'd3);
    check(events == 3 && frames == 3 && dropped == 3, $sformatf("events %0d frames %0d dropped %0d", events, frames, dropped));
    check(perr[0] == 0 && perr[1] == 0, "Dilogic protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
