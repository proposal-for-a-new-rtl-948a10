// Body shared by the end-to-end testbenches of cpv_segment. The including
// module declares NCOL, FIFO_STALL_EXPECTED, the DUT instance `dut` with the
// port names below and the task end_test, which prints the result and stops.
//
// 2*NCOL five-chip chain models stand for the Dilogic cards. The test waits
// for every lane to come up, then fires triggers for events of chosen
// occupancy and checks the event block that leaves the DDL port word by word
// against one computed here from the chain models' hit pattern: CDH, CPV
// header, per column a header and the Dilogic words and markers of Dilogic
// 1-10, the segment marker. Mechanisms counted, each must occur: trigger
// rejected while the links are down, trigger rejected while busy, fill words
// inside frames (frame built while the readout runs), DDL back-pressure, a fully
// occupied event, an empty event, and (where FIFO_STALL_EXPECTED) FIFO stalls.

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic xclk = 1'b0;            // lane word clock, 78.125 MHz against 100 MHz
  always #25 clk = ~clk;
  always #32 xclk = ~xclk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [1:0]       en_in_n [NCOL];
  logic [1:0]       strin_n [NCOL];
  logic [DIL_W-1:0] iobus   [NCOL][2];
  logic [1:0]       en_out  [NCOL];
  logic trig, busy, dv, dl, dr, links_up, cols_busy;
  logic [31:0] dd, lbc, stalls, fills;
  logic [15:0] acc, rej, sent, lerrs, dropped, ovr;

  int unsigned nh   [NCOL][2][5];
  int unsigned seed;
  int unsigned perr [NCOL][2];
  int unsigned strb [NCOL][2];

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    for (genvar g = 0; g < 2; g++) begin : g_grp
      dilogic_chain_model #(.FIRST_CHIP(1 + 5 * g)) chain (
        .clk, .en_in_n(en_in_n[c][g]), .strin_n(strin_n[c][g]), .iobus(iobus[c][g]),
        .en_out_last(en_out[c][g]), .nhits(nh[c][g]), .seed(seed + c),
        .proto_errors(perr[c][g]), .strobes(strb[c][g]));
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL at %0d: %s", cyc, what); end
  endtask

  // DDL side: back-pressure on in some events
  logic bp;
  int   bp_cycles = 0;
  logic [31:0] outq[$];
  always @(negedge clk) dr <= !bp || ($urandom % 3 != 0);
  always @(posedge clk) if (rst_n) begin
    if (dv && dr) outq.push_back(dd);
    if (dv && !dr) bp_cycles++;
  end

  int rej_links = 0, rej_busy = 0, full_events = 0, empty_events = 0;
  int max_busy = 0;

  task automatic run_event(input int unsigned s, input int unsigned mean, input logic backp);
    logic [31:0] expq[$];
    int total;
    logic [15:0] ev;
    logic [15:0] r0;
    seed = s;
    bp = backp;
    total = 0;
    for (int c = 0; c < NCOL; c++)
      for (int g = 0; g < 2; g++)
        for (int k = 0; k < 5; k++)
          nh[c][g][k] = (mean == 99) ? 48 : nhits_of(s + c, 1 + 5 * g + k, mean);
    ev = acc + 16'd1;
    outq.delete();
    @(negedge clk);
    trig = 1; @(negedge clk); trig = 0;
    check(busy, "busy after trigger");
    repeat (100) @(negedge clk);
    r0 = rej;
    trig = 1; @(negedge clk); trig = 0;       // during busy
    @(negedge clk);
    if (rej == r0 + 16'd1) rej_busy++;
    while (busy) @(negedge clk);
    repeat (2) @(negedge clk);
    // expected block
    for (int c = 0; c < NCOL; c++) begin
      int n;
      n = 0;
      for (int g = 0; g < 2; g++) for (int k = 0; k < 5; k++) n += nh[c][g][k] + 1;
      total += n;
    end
    expq.push_back(32'((total + 16 + NCOL) * 4));
    expq.push_back({8'h03, 8'h00, ev});
    repeat (8) expq.push_back(0);
    expq.push_back({8'hC5, 8'h00, ev});
    expq.push_back(32'(total));
    expq.push_back(0);
    expq.push_back(32'(NCOL));
    expq.push_back(0);
    for (int c = 0; c < NCOL; c++) begin
      int n;
      n = 0;
      for (int g = 0; g < 2; g++) for (int k = 0; k < 5; k++) n += nh[c][g][k] + 1;
      expq.push_back({8'hCC, 4'(c), 4'b0, 16'(n)});
      for (int g = 0; g < 2; g++)
        for (int k = 0; k < 5; k++) begin
          int unsigned chip;
          chip = 1 + 5 * g + k;
          for (int i = 0; i < int'(nh[c][g][k]); i++)
            expq.push_back({4'(c), 4'(chip), 6'b0, hit_word(s + c, chip, i)});
          expq.push_back({4'(c), 4'(chip), 6'b0, make_marker(4'(chip), 6'(nh[c][g][k]))});
        end
    end
    expq.push_back({8'h5E, 8'h00, ev});
    check(outq.size() == expq.size(), $sformatf("event %0d: %0d words, expected %0d", ev, outq.size(), expq.size()));
    for (int i = 0; i < expq.size() && i < outq.size(); i++)
      check(outq[i] == expq[i], $sformatf("event %0d word %0d: %h expected %h", ev, i, outq[i], expq[i]));
    if (mean == 99) full_events++;
    if (mean == 0) empty_events++;
    if (int'(lbc) > max_busy && mean == 7) max_busy = int'(lbc);
    $display("event %0d: %0d payload words, %0d block bytes, busy %0d cycles (%0d ns)",
             ev, total, (total + 16 + NCOL) * 4, lbc, lbc * 10);
  endtask

  initial begin
    trig = 0; seed = 0; bp = 0;
    for (int c = 0; c < NCOL; c++) for (int g = 0; g < 2; g++) for (int k = 0; k < 5; k++) nh[c][g][k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    trig = 1; @(negedge clk); trig = 0;       // links still down
    @(negedge clk);
    if (rej == 1 && acc == 0) rej_links++;
    while (!links_up) @(negedge clk);
    $display("all lanes up after %0d cycles", cyc);
    repeat (5) @(negedge clk);
    run_event(1000, 7, 1'b0);    // 15% occupancy: about 72 hits per column
    run_event(2000, 7, 1'b1);
    run_event(3000, 0, 1'b0);    // empty
    run_event(4000, 99, 1'b1);   // every pad hit
    run_event(5000, 2, 1'b0);
    check(acc == 5 && sent == 5 && lerrs == 0 && ovr == 0 && dropped == 0,
          $sformatf("accepted %0d sent %0d lane errors %0d overruns %0d dropped %0d", acc, sent, lerrs, ovr, dropped));
    for (int c = 0; c < NCOL; c++) for (int g = 0; g < 2; g++)
      check(perr[c][g] == 0, $sformatf("Dilogic protocol errors, column %0d group %0d", c, g));
    // 15% occupancy must fit the proposal's column-to-DAQ budget: parallel
    // Dilogic readout 11.2 us + column transfer 3 us + DDL 8 us = 2220 cycles
    check(max_busy > 0 && max_busy <= 2220, $sformatf("busy %0d cycles at 15%% occupancy", max_busy));
    // every mechanism must have happened
    check(rej_links > 0, "trigger rejected while links down");
    check(rej_busy == 5, "trigger rejected while busy");
    check(fills > 0, "fill words inside frames");
    check(bp_cycles > 0, "DDL back-pressure");
    check(full_events == 1 && empty_events == 1, "full and empty events");
    if (FIFO_STALL_EXPECTED) check(stalls > 0, "FIFO stall");
    $display("mechanisms: links-down rejects %0d, busy rejects %0d, fill words in frames %0d, DDL back-pressure cycles %0d, FIFO stall cycles %0d, full events %0d, empty events %0d",
             rej_links, rej_busy, fills, bp_cycles, stalls, full_events, empty_events);
    end_test();
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    end_test();
  end
