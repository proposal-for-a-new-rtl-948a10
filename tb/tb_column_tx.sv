// tb_column_tx: feeds the frame transmitter from two FIFOs filled by the test
// with Dilogic-style word streams (hits, then a marker per chip) and decodes
// the lane words it sends. Checks: fill words between frames, SOF with column
// and event number, every payload word with its column and Dilogic number in
// order (group 1 = Dilogic 1-5 first), EOF with the word count, and the rate:
// with both groups already stored, a frame of N words takes N + 4 cycles from
// SOF to EOF inclusive (one fill cycle at the group change and one at the end).
// A second case delivers the words slowly while the frame is being sent, so
// fill words appear inside the frame. A third case lowers tx_adv at random,
// as a full lane FIFO would, and checks that no word is lost or repeated.
module tb_column_tx;
  import cpv_pkg::*;
  import tb_dil_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic start, busy, frame_done;
  logic tx_adv = 1'b1;
  bit   rand_adv = 0;
  logic [15:0] event_id, fwords;
  logic [1:0] grp_done, fifo_rd, fifo_empty, wr;
  logic [DIL_W-1:0] fdata [2];
  logic [DIL_W-1:0] wdata [2];
  lane_word_t tx;
  logic [31:0] fills;

  column_tx #(.COL_ID(4'd5)) dut (
    .clk, .rst_n, .start, .tx_adv, .event_id, .grp_done, .fifo_data(fdata), .fifo_empty,
    .fifo_rd, .tx_word(tx), .busy, .frame_done, .frame_words(fwords), .fill_in_frame(fills));

  for (genvar g = 0; g < 2; g++) begin : g_f
    sync_fifo #(.WIDTH(DIL_W), .DEPTH(256)) f (
      .clk, .rst_n, .wr_en(wr[g]), .wr_data(wdata[g]), .rd_en(fifo_rd[g]),
      .rd_data(fdata[g]), .empty(fifo_empty[g]), .full(), .count());
  end

  // expected payload of the column
  logic [LW-1:0] expq[$];
  logic [DIL_W-1:0] grpq [2][$];

  task automatic make_event(input int unsigned seed, input int unsigned mean);
    expq.delete();
    for (int g = 0; g < 2; g++) begin
      grpq[g].delete();
      for (int c = 0; c < 5; c++) begin
        int unsigned chip, n;
        chip = 1 + 5 * g + c;
        n = nhits_of(seed, chip, mean);
        for (int k = 0; k < int'(n); k++) begin
          grpq[g].push_back(hit_word(seed, chip, k));
          expq.push_back({4'd5, 4'(chip), 6'b0, hit_word(seed, chip, k)});
        end
        grpq[g].push_back(make_marker(4'(chip), 6'(n)));
        expq.push_back({4'd5, 4'(chip), 6'b0, make_marker(4'(chip), 6'(n))});
      end
    end
  endtask

  // lane monitor
  int sof_cyc, eof_cyc, nrx, frames, in_frame, idle_between, fill_inside;
  logic [15:0] ev_exp;
  always @(negedge clk) if (rand_adv) tx_adv <= ($urandom_range(0, 9) < 6);

  // a word counts only in cycles where it is consumed
  always @(posedge clk) if (rst_n && tx_adv) begin
    if (is_ctrl(tx, K28_1)) begin
      checks++;
      if (tx.data[31:28] != 4'd5 || tx.data[23:8] != ev_exp) begin
        failures++; $display("SOF %h", tx.data);
      end
      sof_cyc <= cyc; nrx <= 0; in_frame <= 1;
    end else if (is_ctrl(tx, K28_3)) begin
      checks++;
      if (tx.data[23:8] != 16'(nrx) || nrx != expq.size()) begin
        failures++; $display("EOF count %0d, received %0d, expected %0d", tx.data[23:8], nrx, expq.size());
      end
      eof_cyc <= cyc; frames <= frames + 1; in_frame <= 0;
    end else if (tx.datak == DATAK_DATA) begin
      checks++;
      if (nrx >= expq.size() || tx.data !== expq[nrx]) begin
        failures++; $display("payload %0d: %h", nrx, tx.data);
      end
      nrx <= nrx + 1;
    end else if (tx.data == IDLE_WORD && tx.datak == DATAK_CTRL) begin
      if (in_frame != 0) fill_inside <= fill_inside + 1;
      else idle_between <= idle_between + 1;
    end else begin
      checks++; failures++; $display("unknown word %h/%b", tx.data, tx.datak);
    end
  end

  task automatic load(input int g, input int gap);
    while (grpq[g].size() > 0) begin
      wr[g] = 1; wdata[g] = grpq[g].pop_front();
      @(negedge clk);
      wr[g] = 0;
      repeat (gap) @(negedge clk);
    end
    grp_done[g] = 1;
  endtask

  task automatic fire(input logic [15:0] ev);
    ev_exp = ev; event_id = ev;
    start = 1; @(negedge clk); start = 0;
  endtask

  initial begin
    start = 0; grp_done = 0; wr = 0; wdata[0] = 0; wdata[1] = 0; event_id = 0;
    frames = 0; in_frame = 0; idle_between = 0; fill_inside = 0; nrx = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    // case 1: all data stored before the frame starts
    for (int e = 0; e < 3; e++) begin
      make_event(100 + e, (e == 2) ? 20 : 7);
      grp_done = 0;
      load(0, 0);
      load(1, 0);
      fire(16'(e + 1));
      while (busy || start) @(negedge clk);
      @(negedge clk);
      checks++;
      if (eof_cyc - sof_cyc != expq.size() + 3) begin
        failures++; $display("frame of %0d words took %0d cycles", expq.size(), eof_cyc - sof_cyc + 1);
      end
      repeat (5) @(negedge clk);
    end
    // case 2: words arrive while the frame is being sent
    make_event(200, 7);
    grp_done = 0;
    fire(16'd77);
    fork
      load(0, 9);
      load(1, 13);
    join
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (frames != 4 || fill_inside == 0 || idle_between == 0) begin
      failures++; $display("frames %0d fill inside %0d idle between %0d", frames, fill_inside, idle_between);
    end
    $display("frames %0d, fill words inside frames %0d", frames, fill_inside);
    // case 3: the lane FIFO pushes back at random
    make_event(300, 12);
    grp_done = 0;
    rand_adv = 1;
    fire(16'd78);
    fork
      load(0, 2);
      load(1, 3);
    join
    while (busy) @(negedge clk);
    rand_adv = 0; tx_adv = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (frames != 5 || nrx != expq.size()) begin
      failures++; $display("with push-back: frames %0d, words %0d of %0d", frames, nrx, expq.size());
    end
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
