// tb_lane_rx: sends frames word by word into the lane receiver, with fill
// words scattered inside and between frames, and reads the buffer back.
// Checks column and event number, word count, every stored word, the error
// flag for a wrong EOF count and for an oversize frame (small 64-word buffer),
// and that a frame arriving before release is dropped and counted.
module tb_lane_rx;
  import cpv_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic link_up, fvalid, err, rel;
  logic [31:0] rxd, rdata;
  logic [3:0] rxk, col;
  logic [15:0] ev, nw, ovr;
  logic [5:0] raddr;

  lane_rx #(.DEPTH(64)) dut (
    .clk, .rst_n, .link_up, .rx_parallel_data(rxd), .rx_datak(rxk),
    .frame_valid(fvalid), .col_id(col), .event_id(ev), .nwords(nw), .err,
    .release_frame(rel), .overruns(ovr), .rd_addr(raddr), .rd_data(rdata));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input lane_word_t w);
    rxd = w.data; rxk = w.datak; @(negedge clk);
    rxd = IDLE_WORD; rxk = DATAK_CTRL;
  endtask

  logic [31:0] words[$];
  task automatic frame(input logic [3:0] c, input logic [15:0] e, input int n, input int count_adj);
    words.delete();
    send(ctrl_word({c, 4'h0, e}, K28_1));
    for (int i = 0; i < n; i++) begin
      words.push_back($urandom);
      send('{data: words[i], datak: DATAK_DATA});
      if ($urandom % 4 == 0) @(negedge clk);     // fill word inside the frame
    end
    send(ctrl_word({8'h00, 16'(n + count_adj)}, K28_3));
    @(negedge clk);
  endtask

  task automatic readback(input int n);
    for (int i = 0; i < n; i++) begin
      raddr = 6'(i);
      @(negedge clk);
      check(rdata == words[i], $sformatf("word %0d: %h expected %h", i, rdata, words[i]));
    end
    rel = 1; @(negedge clk); rel = 0;
    check(!fvalid, "release clears frame_valid");
  endtask

  initial begin
    link_up = 0; rxd = IDLE_WORD; rxk = DATAK_CTRL; rel = 0; raddr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // while the link is down nothing is taken
    send(ctrl_word({4'd3, 4'h0, 16'd9}, K28_1));
    send(ctrl_word({8'h00, 16'd0}, K28_3));
    @(negedge clk);
    check(!fvalid, "nothing received with link down");
    link_up = 1;
    for (int f = 0; f < 4; f++) begin
      frame(4'd3, 16'(f + 1), 10 + 13 * f, 0);
      check(fvalid && !err && col == 4'd3 && ev == 16'(f + 1) && nw == 16'(10 + 13 * f),
            $sformatf("frame %0d header: valid %0d err %0d col %0d ev %0d n %0d", f, fvalid, err, col, ev, nw));
      readback(10 + 13 * f);
    end
    // wrong count in EOF
    frame(4'd3, 16'd20, 12, 1);
    check(fvalid && err, "count mismatch flagged");
    // frame before release is dropped
    frame(4'd3, 16'd21, 5, 0);
    check(ovr == 1 && ev == 16'd20 && nw == 16'd12, "overrun counted, held frame kept");
    rel = 1; @(negedge clk); rel = 0;
    // oversize frame
    frame(4'd3, 16'd22, 70, 0);
    check(fvalid && err && nw == 16'd64, "oversize frame flagged and clipped");
    readback(64);
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
