// tb_sync_fifo: random pushes and pops against a queue reference, for a
// 256 x 18 FIFO; checks data order, count, empty and full, and that pushes
// into a full FIFO are never issued by the test (the FIFO asserts on it).
module tb_sync_fifo;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int DEPTH = 256;
  logic wr, rd, empty, full;
  logic [17:0] wd, rdat;
  logic [8:0] cnt;
  logic [17:0] q[$];
  int fulls = 0;

  sync_fifo #(.WIDTH(18), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .wr_en(wr), .wr_data(wd), .rd_en(rd), .rd_data(rdat),
    .empty, .full, .count(cnt));

  initial begin
    wr = 0; rd = 0; wd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      // reference checks before the edge
      checks++;
      if (int'(cnt) != q.size() || empty != (q.size() == 0) || full != (q.size() == DEPTH)) begin
        failures++;
        $display("status: count %0d empty %0d full %0d, reference size %0d", cnt, empty, full, q.size());
      end
      if (q.size() > 0) begin
        checks++;
        if (rdat !== q[0]) begin failures++; $display("data %h exp %h", rdat, q[0]); end
      end
      if (full) fulls++;
      // fill phase, drain phase, mixed phase
      if (i < 1500)      begin wr = ($urandom % 4 != 0); rd = ($urandom % 4 == 0); end
      else if (i < 3000) begin wr = ($urandom % 4 == 0); rd = ($urandom % 4 != 0); end
      else               begin wr = 1'($urandom % 2); rd = 1'($urandom % 2); end
      if (full) wr = 0;
      wd = 18'($urandom);
      if (rd && q.size() > 0) void'(q.pop_front());
      if (wr) q.push_back(wd);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FIFO never became full"); end
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
