// tb_trigger_ctrl: triggers with links down are rejected; an accepted trigger
// issues one command with the next event number and raises busy; triggers
// during busy are rejected; event_sent ends busy and the busy length is kept.
module tb_trigger_ctrl;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic trig, links_up, event_sent, cmd_valid, busy;
  logic [15:0] ev, acc, rej;
  logic [31:0] lbc;
  int cmds = 0;

  trigger_ctrl dut (.clk, .rst_n, .trig, .links_up, .event_sent, .cmd_valid,
                    .cmd_event_id(ev), .busy, .accepted(acc), .rejected(rej),
                    .last_busy_cycles(lbc));

  always @(posedge clk) if (cmd_valid) cmds++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse_trig;
    trig = 1; @(negedge clk); trig = 0;
  endtask

  initial begin
    trig = 0; links_up = 0; event_sent = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    pulse_trig();
    @(negedge clk);
    check(rej == 1 && acc == 0 && !busy && cmds == 0, "trigger with links down rejected");
    links_up = 1;
    for (int e = 1; e <= 5; e++) begin
      pulse_trig();
      check(cmd_valid && ev == 16'(e) && busy, $sformatf("command for event %0d", e));
      repeat (10) @(negedge clk);
      pulse_trig();                          // during busy
      repeat (20 * e) @(negedge clk);
      check(busy, "busy held until the event is sent");
      event_sent = 1; @(negedge clk); event_sent = 0;
      check(!busy, "busy released by event_sent");
      check(lbc == 32'(12 + 20 * e), $sformatf("busy length %0d", lbc));
      @(negedge clk);
    end
    check(acc == 5 && rej == 6 && cmds == 5, $sformatf("accepted %0d rejected %0d commands %0d", acc, rej, cmds));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
