// tb_event_builder: eight lane buffers modelled in the test (synchronous
// read, like lane_rx) hold random column data; the builder's output stream is
// compared word by word with the event block computed here: CDH (10 words),
// CPV header (5), per column a header and its words, segment marker with
// ddl_last. Runs with ddl_ready always high (rate: at most 17 + 2*NCOL + P + 3
// cycles) and with random back-pressure; checks release and event_sent.
module tb_event_builder;
  import cpv_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int NCOL = 8;
  logic [15:0] event_id;
  logic [NCOL-1:0] fvalid, lerr;
  logic [15:0] nwords [NCOL];
  logic [15:0] levid [NCOL];
  logic [10:0] raddr;
  logic [31:0] rdata [NCOL];
  logic rel, dv, dl, dr, sent, busy;
  logic [31:0] dd;

  event_builder #(.NCOL(NCOL), .DEPTH(2048), .SEG_ID(8'h02)) dut (
    .clk, .rst_n, .event_id, .frame_valid(fvalid), .nwords, .lane_evid(levid),
    .lane_err(lerr), .rd_addr(raddr), .rd_data(rdata), .release_frame(rel),
    .ddl_valid(dv), .ddl_data(dd), .ddl_last(dl), .ddl_ready(dr),
    .event_sent(sent), .busy);

  logic [31:0] buffer [NCOL][2048];
  always @(posedge clk) for (int c = 0; c < NCOL; c++) rdata[c] <= buffer[c][raddr];

  logic [31:0] expq[$];
  int got, releases;
  logic bp;   // random back-pressure on

  always @(posedge clk) if (rel) releases++;

  always @(negedge clk) dr <= !bp || ($urandom % 3 != 0);

  always @(posedge clk) if (rst_n && dv && dr) begin
    checks++;
    if (got >= expq.size() || dd !== expq[got] || dl !== (got == expq.size() - 1)) begin
      failures++;
      $display("word %0d: got %h last %0d, expected %h", got, dd, dl,
               (got < expq.size()) ? expq[got] : 32'hx);
    end
    got++;
  end

  task automatic run(input logic [15:0] ev, input int maxw, input logic [NCOL-1:0] errs);
    int total, t0;
    expq.delete();
    total = 0;
    for (int c = 0; c < NCOL; c++) begin
      nwords[c] = 16'($urandom % (maxw + 1));
      levid[c]  = ev;
      total += int'(nwords[c]);
      for (int i = 0; i < nwords[c]; i++) buffer[c][i] = $urandom;
    end
    lerr = errs;
    event_id = ev;
    expq.push_back(32'((total + 10 + 5 + NCOL + 1) * 4));
    expq.push_back({8'h03, 8'h02, ev});
    repeat (8) expq.push_back(0);
    expq.push_back({8'hC5, 8'h02, ev});
    expq.push_back(32'(total));
    expq.push_back(32'(errs));
    expq.push_back(32'(NCOL));
    expq.push_back(0);
    for (int c = 0; c < NCOL; c++) begin
      expq.push_back({8'hCC, 4'(c), 4'b0, nwords[c]});
      for (int i = 0; i < nwords[c]; i++) expq.push_back(buffer[c][i]);
    end
    expq.push_back({8'h5E, 8'h02, ev});
    got = 0;
    releases = 0;
    @(negedge clk);
    fvalid = '1;
    t0 = cyc;
    while (!rel) @(negedge clk);
    fvalid = '0;
    while (!(sent)) @(negedge clk);
    @(negedge clk);
    checks++;
    if (got != expq.size() || releases != 1) begin
      failures++; $display("event %0d: %0d of %0d words, %0d releases", ev, got, expq.size(), releases);
    end
    if (!bp) begin
      checks++;
      if (cyc - t0 > 17 + 2 * NCOL + total + 3) begin
        failures++; $display("event of %0d words took %0d cycles", expq.size(), cyc - t0);
      end
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    fvalid = '0; lerr = '0; event_id = 0; bp = 0; dr = 1;
    for (int c = 0; c < NCOL; c++) begin nwords[c] = 0; levid[c] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    run(16'd1, 82, '0);      // ~15% occupancy: 72 hits + 10 markers per column
    run(16'd2, 0, '0);       // empty columns
    bp = 1;
    run(16'd3, 82, 8'h24);
    run(16'd4, 490, '0);     // full occupancy
    bp = 0;
    run(16'd5, 490, '0);
    checks++;
    if (busy) begin failures++; $display("builder still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
