// tb_dilogic_readout: self-checking test of the Dilogic group controller.
//
// Two controllers read two copies of a five-chip chain model. Unit A has the
// full 256-word FIFO, which is only emptied after the event, and is timed: a
// group of W words must take W*40/3 cycles (7.5 MHz strobes at 100 MHz), within
// a few cycles. Unit B has a 16-word FIFO that is popped only every 40 cycles,
// so its strobes must stall; it must still deliver every word in order.
// Events cover empty chips, typical occupancy and a fully hit group (245 words).
module tb_dilogic_readout;
  import cpv_pkg::*;
  import tb_dil_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  int unsigned nh [5];
  int unsigned seed;

  // ---- unit A ----
  logic a_start, a_busy, a_done, a_en_in_n, a_strin_n, a_en_out, a_wr, a_rd, a_empty, a_full;
  logic [15:0] a_words;
  logic [31:0] a_stall;
  logic [DIL_W-1:0] a_bus, a_wd, a_rdata;
  logic [8:0] a_cnt;
  int unsigned a_perr, a_strb;

  dilogic_readout #(.FIFO_DEPTH(256)) dut_a (
    .clk, .rst_n, .start(a_start), .busy(a_busy), .done(a_done), .words(a_words),
    .stall_cycles(a_stall), .en_in_n(a_en_in_n), .strin_n(a_strin_n), .iobus(a_bus),
    .en_out_last(a_en_out), .fifo_wr(a_wr), .fifo_wdata(a_wd), .fifo_count(a_cnt));
  sync_fifo #(.WIDTH(DIL_W), .DEPTH(256)) fifo_a (
    .clk, .rst_n, .wr_en(a_wr), .wr_data(a_wd), .rd_en(a_rd), .rd_data(a_rdata),
    .empty(a_empty), .full(a_full), .count(a_cnt));
  dilogic_chain_model #(.FIRST_CHIP(1)) chain_a (
    .clk, .en_in_n(a_en_in_n), .strin_n(a_strin_n), .iobus(a_bus), .en_out_last(a_en_out),
    .nhits(nh), .seed(seed), .proto_errors(a_perr), .strobes(a_strb));

  // ---- unit B ----
  logic b_busy, b_done, b_en_in_n, b_strin_n, b_en_out, b_wr, b_rd, b_empty, b_full;
  logic [15:0] b_words;
  logic [31:0] b_stall;
  logic [DIL_W-1:0] b_bus, b_wd, b_rdata;
  logic [4:0] b_cnt;
  int unsigned b_perr, b_strb;

  dilogic_readout #(.FIFO_DEPTH(16)) dut_b (
    .clk, .rst_n, .start(a_start), .busy(b_busy), .done(b_done), .words(b_words),
    .stall_cycles(b_stall), .en_in_n(b_en_in_n), .strin_n(b_strin_n), .iobus(b_bus),
    .en_out_last(b_en_out), .fifo_wr(b_wr), .fifo_wdata(b_wd), .fifo_count(b_cnt));
  sync_fifo #(.WIDTH(DIL_W), .DEPTH(16)) fifo_b (
    .clk, .rst_n, .wr_en(b_wr), .wr_data(b_wd), .rd_en(b_rd), .rd_data(b_rdata),
    .empty(b_empty), .full(b_full), .count(b_cnt));
  dilogic_chain_model #(.FIRST_CHIP(6)) chain_b (
    .clk, .en_in_n(b_en_in_n), .strin_n(b_strin_n), .iobus(b_bus), .en_out_last(b_en_out),
    .nhits(nh), .seed(seed), .proto_errors(b_perr), .strobes(b_strb));

  // expected word j of a group starting at chip `first`
  function automatic logic [DIL_W-1:0] exp_word(input int unsigned first, input int unsigned j);
    int unsigned r;
    r = j;
    for (int c = 0; c < 5; c++) begin
      if (r < nh[c]) return hit_word(seed, first + c, r);
      if (r == nh[c]) return make_marker(4'(first + c), 6'(nh[c]));
      r = r - nh[c] - 1;
    end
    return '1;
  endfunction

  // unit B drain: pop one word every 40 cycles, check it on the fly
  int unsigned b_got;
  int          b_div;
  assign b_rd = !b_empty && (b_div == 0);
  always @(posedge clk) begin
    if (!rst_n) b_div <= 0;
    else begin
      b_div <= (b_div == 39) ? 0 : b_div + 1;
      if (b_rd) begin
        checks++;
        if (b_rdata !== exp_word(6, b_got)) begin
          failures++;
          $display("B word %0d: got %h exp %h", b_got, b_rdata, exp_word(6, b_got));
        end
        b_got <= b_got + 1;
      end
    end
  end

  int stalls_seen = 0;

  task automatic run_event(input int unsigned s, input int unsigned mean);
    int unsigned total, t0, t1, exp_cyc, got;
    seed = s;
    total = 0;
    for (int c = 0; c < 5; c++) begin
      nh[c] = (mean == 99) ? 48 : nhits_of(s, c, mean);
      total += nh[c] + 1;
    end
    b_got = 0;
    @(negedge clk);
    a_start = 1'b1;
    t0 = int'($time / 10);
    @(negedge clk);
    a_start = 1'b0;
    while (!a_done) @(negedge clk);
    t1 = int'($time / 10);
    exp_cyc = total * 40 / 3;
    checks++;
    if (t1 - t0 + 5 < exp_cyc || t1 - t0 > exp_cyc + 20) begin
      failures++;
      $display("A timing: %0d words in %0d cycles, expected about %0d", total, t1 - t0, exp_cyc);
    end
    checks++;
    if (a_words != 16'(total) || 32'(a_cnt) != total) begin
      failures++;
      $display("A count: words=%0d fifo=%0d expected %0d", a_words, a_cnt, total);
    end
    // drain A and compare
    got = 0;
    while (!a_empty) begin
      checks++;
      if (a_rdata !== exp_word(1, got)) begin
        failures++;
        $display("A word %0d: got %h exp %h", got, a_rdata, exp_word(1, got));
      end
      a_rd = 1'b1;
      @(negedge clk);
      a_rd = 1'b0;
      got++;
    end
    // wait for B to finish and drain
    while (b_busy || !b_empty) @(negedge clk);
    checks++;
    if (b_got != total || b_words != 16'(total)) begin
      failures++;
      $display("B count: got %0d words=%0d expected %0d", b_got, b_words, total);
    end
  endtask

  initial begin
    a_start = 1'b0;
    a_rd = 1'b0;
    seed = 0;
    for (int c = 0; c < 5; c++) nh[c] = 0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    run_event(11, 0);     // only markers
    run_event(12, 7);     // ~15% occupancy
    run_event(13, 3);
    run_event(14, 99);    // every channel hit: 245 words
    stalls_seen = int'(b_stall);
    checks++;
    if (b_stall == 0) begin
      failures++;
      $display("the small FIFO never stalled the strobes");
    end
    checks++;
    if (a_stall != 0) begin
      failures++;
      $display("the 256-word FIFO stalled");
    end
    checks++;
    if (a_perr != 0 || b_perr != 0) begin
      failures++;
      $display("chain protocol errors: %0d %0d", a_perr, b_perr);
    end
    $display("stall cycles in unit B: %0d", stalls_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
