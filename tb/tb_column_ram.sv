// tb_column_ram: frames with fill words scattered inside are written into the
// column RAM by a source that obeys in_adv; the lane side takes words with a
// random out_adv in some frames and always in others. Checks: each frame
// comes out whole and in order as one burst (SOF, payload, EOF with no fill
// word between them), the input is held off while a burst is sent, busy
// covers the frame from EOF to the end of the burst, and with out_adv always
// high the burst takes payload + 2 cycles.
module tb_column_ram;
  import cpv_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  localparam lane_word_t FILL = '{data: IDLE_WORD, datak: DATAK_CTRL};

  lane_word_t in_word, out_word;
  logic in_adv, out_adv, busy;
  logic [15:0] bursts;
  bit rand_out = 0;

  column_ram #(.DEPTH(512)) dut (
    .clk, .rst_n, .in_word, .in_adv, .out_word, .out_adv, .busy, .bursts);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL at %0d: %s", cyc, what); end
  endtask

  always @(negedge clk) out_adv <= rand_out ? ($urandom_range(0, 3) != 0) : 1'b1;

  // expected frames, as word lists
  lane_word_t expq[$];
  int in_burst = 0, burst_start = 0, burst_len = 0, got = 0;
  always @(posedge clk) if (rst_n && out_adv) begin
    if (out_word != FILL) begin
      checks++;
      if (expq.size() == 0 || out_word !== expq[0]) begin
        failures++; $display("word %0d: %h/%b", got, out_word.data, out_word.datak);
      end
      if (expq.size() != 0) void'(expq.pop_front());
      got++;
      if (is_ctrl(out_word, K28_1)) begin in_burst = 1; burst_start = cyc; end
      if (is_ctrl(out_word, K28_3)) begin in_burst = 0; burst_len = cyc - burst_start + 1; end
    end else if (in_burst != 0) begin
      checks++; failures++; $display("fill word inside a burst at %0d", cyc);
    end
  end

  // one frame of n payload words through the input, honouring in_adv
  task automatic send(input int n, input logic [15:0] ev);
    lane_word_t w;
    for (int i = -1; i <= n; i++) begin
      if (i < 0)       w = '{data: {4'd3, 4'h0, ev, K28_1}, datak: DATAK_CTRL};
      else if (i == n) w = '{data: {8'h00, 16'(n), K28_3}, datak: DATAK_CTRL};
      else             w = '{data: $urandom, datak: DATAK_DATA};
      expq.push_back(w);
      in_word = w;
      @(posedge clk);
      while (!in_adv) @(posedge clk);
      #1;
      if ($urandom_range(0, 3) == 0) begin
        in_word = FILL;
        @(posedge clk); #1;
      end
    end
    in_word = FILL;
    #1;
    check(busy, "busy right after EOF");
  endtask

  int seen_held;
  always @(posedge clk) if (rst_n && !in_adv && in_word != FILL) seen_held++;

  initial begin
    in_word = FILL; seen_held = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    // bursts with a lane that always takes words
    for (int f = 0; f < 3; f++) begin
      int n;
      n = (f == 2) ? 0 : 50 + 100 * f;
      send(n, 16'(f));
      while (busy) @(posedge clk);
      repeat (3) @(posedge clk);
      check(burst_len == n + 2, $sformatf("burst of %0d words took %0d cycles", n, burst_len));
    end
    // back-to-back frames with a slow lane: the second is held off
    rand_out = 1;
    send(120, 16'd10);
    send(80, 16'd11);
    while (busy) @(posedge clk);
    repeat (10) @(posedge clk);
    rand_out = 0;
    repeat (3) @(posedge clk);
    check(expq.size() == 0, $sformatf("%0d words not delivered", expq.size()));
    check(bursts == 5, $sformatf("bursts %0d", bursts));
    check(seen_held > 0, "input held off during a burst");
    $display("%0d words delivered in %0d bursts", got, bursts);
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
