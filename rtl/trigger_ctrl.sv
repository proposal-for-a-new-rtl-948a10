// trigger_ctrl: trigger acceptance, event numbering and busy of a segment.
//
// A trigger (one-cycle pulse) is accepted when all column lanes are up and
// the segment is not busy. An accepted trigger gets the next event number and
// is forwarded to the columns as a readout command (cmd_valid for one cycle,
// with cmd_event_id); busy then stays high until the event builder reports
// that the event block has been sent (event_sent). Busy is the segment's
// dead time: it covers the Dilogic readout, the column-to-segment transfer and
// the transfer to the DDL. Triggers that arrive while busy, or while a lane
// is down, are rejected and counted. The length of the last busy period in
// clock cycles is kept in last_busy_cycles.
//
// From the proposal: the busy time runs from the arrival of the trigger to the
// end of the transmission of the event data. The command path, the event
// numbering (16 bits, starting at 1) and the rejection rule are this design's
// own; the proposal's trigger levels and latencies are not modelled, a single
// readout trigger stands for them.
module trigger_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        trig,
  input  logic        links_up,
  input  logic        event_sent,
  output logic        cmd_valid,
  output logic [15:0] cmd_event_id,
  output logic        busy,
  output logic [15:0] accepted,
  output logic [15:0] rejected,
  output logic [31:0] last_busy_cycles
);
  logic [31:0] bcnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cmd_valid        <= 1'b0;
      cmd_event_id     <= '0;
      busy             <= 1'b0;
      accepted         <= '0;
      rejected         <= '0;
      bcnt             <= '0;
      last_busy_cycles <= '0;
    end else begin
      cmd_valid <= 1'b0;
      if (busy) begin
        bcnt <= bcnt + 1'b1;
        if (event_sent) begin
          busy             <= 1'b0;
          last_busy_cycles <= bcnt + 1'b1;
        end
      end
      if (trig) begin
        if (!busy && links_up) begin
          busy         <= 1'b1;
          bcnt         <= '0;
          cmd_valid    <= 1'b1;
          cmd_event_id <= cmd_event_id + 1'b1;
          accepted     <= accepted + 1'b1;
        end else begin
          rejected <= rejected + 1'b1;
        end
      end
    end
  end

  ap_cmd_only_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                          cmd_valid |-> busy);
endmodule
