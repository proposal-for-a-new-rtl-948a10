// tb_async_fifo: two dual-clock FIFOs, one written on the faster clock and
// read on the slower, the other the reverse. Both sides enable at random.
// Every word read is compared with a reference queue, so loss, duplication or
// reordering fails. Also checked: the fast-write FIFO reports full and never
// accepts a write while full, the fast-read FIFO runs empty, and everything
// written comes out.
module tb_async_fifo;
  logic ca = 1'b0, cb = 1'b0;
  always #25 ca = ~ca;                // 100 MHz
  always #32 cb = ~cb;                // 78.125 MHz
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  localparam int N = 3000;
  localparam int W = 36;

  // instance 0 writes on ca and reads on cb; instance 1 the reverse
  logic [1:0] wclk, rclk;
  assign wclk = {cb, ca};
  assign rclk = {ca, cb};

  logic [1:0]   wr_en, rd_en, full, empty;
  logic [W-1:0] wdata [2];
  logic [W-1:0] rdata [2];
  logic [W-1:0] refq [2][$];
  int nwr [2], nrd [2], saw_full [2], saw_empty [2];

  for (genvar i = 0; i < 2; i++) begin : g_i
    async_fifo #(.WIDTH(W), .DEPTH(16)) dut (
      .wclk(wclk[i]), .wrst_n(rst_n), .wr_en(wr_en[i]), .wr_data(wdata[i]), .full(full[i]),
      .rclk(rclk[i]), .rrst_n(rst_n), .rd_en(rd_en[i]), .rd_data(rdata[i]), .empty(empty[i]));

    initial begin
      wr_en[i] = 0; wdata[i] = '0; nwr[i] = 0; saw_full[i] = 0;
      @(posedge rst_n);
      forever begin
        @(negedge wclk[i]);
        wr_en[i] = (nwr[i] < N) && ($urandom % 4 != 0);
        wdata[i] = {4'(i), 32'($urandom)};
      end
    end
    always @(posedge wclk[i]) if (rst_n && wr_en[i]) begin
      if (full[i]) saw_full[i]++;
      else begin
        refq[i].push_back(wdata[i]);
        nwr[i]++;
      end
    end

    initial begin
      rd_en[i] = 0; nrd[i] = 0; saw_empty[i] = 0;
      @(posedge rst_n);
      forever begin
        @(negedge rclk[i]);
        rd_en[i] = ($urandom % 5 != 0);
      end
    end
    always @(posedge rclk[i]) if (rst_n && rd_en[i]) begin
      if (empty[i]) saw_empty[i]++;
      else begin
        checks++;
        if (refq[i].size() == 0 || rdata[i] !== refq[i][0]) begin
          failures++;
          $display("FIFO %0d word %0d: read %h", i, nrd[i], rdata[i]);
        end
        if (refq[i].size() != 0) void'(refq[i].pop_front());
        nrd[i]++;
      end
    end
  end

  initial begin
    repeat (4) @(posedge ca);
    rst_n = 1;
    wait (nrd[0] == N && nrd[1] == N);
    repeat (10) @(posedge cb);
    checks++;
    if (saw_full[0] == 0 || saw_empty[1] == 0) begin
      failures++; $display("flags not exercised: full %0d empty %0d", saw_full[0], saw_empty[1]);
    end
    checks++;
    if (refq[0].size() != 0 || refq[1].size() != 0 || !empty[0] || !empty[1]) begin
      failures++; $display("words left behind");
    end
    $display("fast write: %0d writes refused while full; fast read: %0d reads found empty",
             saw_full[0], saw_empty[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge ca);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
