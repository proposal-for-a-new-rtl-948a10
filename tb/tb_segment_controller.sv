// tb_segment_controller: the test plays eight column controllers. It waits
// for all lanes to come out of reset, fires triggers, and for each readout
// command seen on a lane answers with a frame of random length and content
// after a random delay. The DDL stream is compared with the event block built
// here. Also checked: the command carries the event number, busy covers the
// event, triggers during busy are rejected, a column that answers with a wrong
// word count is reported in the CPV header error mask and in lane_errors.
// The lanes run on their own clock, 1.28 times slower than the logic clock.
module tb_segment_controller;
  import cpv_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic xclk = 1'b0;
  always #25 clk = ~clk;
  always #32 xclk = ~xclk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int NCOL = 8;
  logic [NCOL-1:0] pd, txa, txd, rxa, rxd, pll_lk, cdr, lane_up;
  logic [31:0] txdat [NCOL];
  logic [3:0]  txk [NCOL];
  logic [31:0] rxdat [NCOL];
  logic [3:0]  rxk [NCOL];
  logic [3:0]  rxs [NCOL];
  logic trig, busy, dv, dl, dr;
  logic [31:0] dd, lbc;
  logic [15:0] acc, rej, sent, lerrs, ovr;

  segment_controller #(.NCOL(NCOL), .SEG_ID(8'h01)) dut (
    .clk, .rst_n, .xcvr_clk(xclk), .pll_powerdown(pd), .tx_analogreset(txa), .tx_digitalreset(txd),
    .rx_analogreset(rxa), .rx_digitalreset(rxd), .pll_locked(pll_lk), .rx_is_lockedtodata(cdr),
    .tx_parallel_data(txdat), .tx_datak(txk), .rx_parallel_data(rxdat), .rx_datak(rxk),
    .rx_syncstatus(rxs), .trig, .busy, .ddl_valid(dv), .ddl_data(dd), .ddl_last(dl),
    .ddl_ready(dr), .lane_up, .accepted(acc), .rejected(rej), .events_sent(sent),
    .lane_errors(lerrs), .overruns_total(ovr), .last_busy_cycles(lbc));

  int pll_cnt [NCOL];
  for (genvar c = 0; c < NCOL; c++) begin : g_phy
    always @(posedge xclk) begin
      pll_cnt[c] <= pd[c] ? 0 : pll_cnt[c] + 1;
      pll_lk[c]  <= !pd[c] && pll_cnt[c] > 20 + c;
      cdr[c]     <= !rxa[c];
    end
    assign rxs[c] = rxd[c] ? 4'h0 : 4'hF;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL at %0d: %s", cyc, what); end
  endtask

  // column answers
  logic [31:0] colw [NCOL][$];
  int bad_col;
  logic [15:0] cur_ev;
  int cmds_seen [NCOL];
  for (genvar c = 0; c < NCOL; c++) begin : g_col
    initial begin
      rxdat[c] = IDLE_WORD; rxk[c] = DATAK_CTRL; cmds_seen[c] = 0;
      forever begin
        @(negedge xclk);
        if (txk[c] == DATAK_CTRL && txdat[c][7:0] == K28_0) begin
          int n, d;
          logic [15:0] ev;
          ev = txdat[c][23:8];
          cmds_seen[c]++;
          check(ev == cur_ev, $sformatf("lane %0d command for event %0d, expected %0d", c, ev, cur_ev));
          n = $urandom % 90;
          d = $urandom % 300;
          colw[c].delete();
          repeat (d) @(negedge xclk);
          rxdat[c] = {4'(c), 4'h0, ev, K28_1}; rxk[c] = DATAK_CTRL; @(negedge xclk);
          for (int i = 0; i < n; i++) begin
            colw[c].push_back({4'(c), 4'(1 + i % 10), 6'b0, 18'($urandom)});
            rxdat[c] = colw[c][i]; rxk[c] = DATAK_DATA; @(negedge xclk);
            if ($urandom % 5 == 0) begin rxdat[c] = IDLE_WORD; rxk[c] = DATAK_CTRL; @(negedge xclk); end
          end
          rxdat[c] = {8'h00, 16'(n + ((c == bad_col) ? 1 : 0)), K28_3}; rxk[c] = DATAK_CTRL; @(negedge xclk);
          rxdat[c] = IDLE_WORD;
        end
      end
    end
  end

  // DDL stream capture
  logic [31:0] outq[$];
  int lasts;
  always @(negedge clk) dr <= ($urandom % 4 != 0);
  always @(posedge clk) if (rst_n && dv && dr) begin
    outq.push_back(dd);
    if (dl) lasts++;
  end

  task automatic event_run(input int bad);
    logic [31:0] expq[$];
    int total;
    logic [NCOL-1:0] emask;
    bad_col = bad;
    cur_ev = acc + 16'd1;
    outq.delete();
    lasts = 0;
    @(negedge clk);
    trig = 1; @(negedge clk); trig = 0;
    check(busy, "busy after trigger");
    repeat (30) @(negedge clk);
    trig = 1; @(negedge clk); trig = 0;        // rejected
    while (busy) @(negedge clk);
    // expected block
    total = 0;
    emask = '0;
    for (int c = 0; c < NCOL; c++) total += colw[c].size();
    if (bad >= 0) emask[bad] = 1'b1;
    expq.push_back(32'((total + 24) * 4));
    expq.push_back({8'h03, 8'h01, cur_ev});
    repeat (8) expq.push_back(0);
    expq.push_back({8'hC5, 8'h01, cur_ev});
    expq.push_back(32'(total));
    expq.push_back(32'(emask));
    expq.push_back(32'(NCOL));
    expq.push_back(0);
    for (int c = 0; c < NCOL; c++) begin
      expq.push_back({8'hCC, 4'(c), 4'b0, 16'(colw[c].size())});
      foreach (colw[c][i]) expq.push_back(colw[c][i]);
    end
    expq.push_back({8'h5E, 8'h01, cur_ev});
    check(outq.size() == expq.size() && lasts == 1,
          $sformatf("event %0d: %0d words (%0d last), expected %0d", cur_ev, outq.size(), lasts, expq.size()));
    for (int i = 0; i < expq.size() && i < outq.size(); i++)
      check(outq[i] == expq[i], $sformatf("word %0d: %h expected %h", i, outq[i], expq[i]));
    check(lbc > 0, "busy length recorded");
  endtask

  initial begin
    trig = 0; bad_col = -1; cur_ev = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    trig = 1; @(negedge clk); trig = 0;       // links down: rejected
    while (!(&lane_up)) @(negedge clk);
    repeat (5) @(negedge clk);
    for (int e = 0; e < 4; e++) event_run(-1);
    event_run(3);
    check(acc == 5 && rej == 6 && sent == 5, $sformatf("accepted %0d rejected %0d sent %0d", acc, rej, sent));
    check(lerrs == 1 && ovr == 0, $sformatf("lane errors %0d overruns %0d", lerrs, ovr));
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
