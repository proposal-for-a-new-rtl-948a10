// segment_controller: the FPGA segment controller of one CPV segment.
//
// It terminates the serial lanes of the NCOL column controllers of its
// segment (8 in the proposal), keeps one 32-bit RAM buffer per column, and
// builds the segment's event block for the DDL2 link. Per lane it holds a
// transceiver reset sequencer, the clock-crossing FIFOs to the transceiver
// (lane_sync; the transceivers' parallel side runs on xcvr_clk) and a frame
// receiver (lane_rx) that fills the column's buffer. The trigger controller numbers the events, sends the
// readout command down every lane (K28.0 word; the fill word 0xAA5507BC is
// sent otherwise) and raises busy until the event has left. The event builder
// waits until every column has delivered its frame, then streams CDH, CPV
// header, column headers with the column data and the segment marker out on
// the ddl_* valid/ready port, where the DDL2 source interface unit connects.
//
// Timing: the readout command is registered on the cycle after the trigger is
// accepted and reaches the transceivers a few cycles later through lane_sync.
// The event block starts one cycle after the last column frame is complete
// and leaves at up to one word per clock.
//
// From the proposal: eight full-duplex serial lanes to the columns, the memory
// buffer holding CDH, column headers, Dilogic and segment markers, the SIU and
// DDL2 behind it, and transceiver reset logic. The internal organisation (one
// buffer per lane, build after all frames are in) is this design's own.
module segment_controller
  import cpv_pkg::*;
#(
  parameter int unsigned NCOL      = 8,
  parameter int unsigned BUF_DEPTH = 2048,
  parameter logic [7:0]  SEG_ID    = 8'd0,
  parameter int unsigned T_PD      = 100,
  parameter int unsigned T_DIG     = 20,
  parameter int unsigned T_LTD     = 400
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              xcvr_clk,
  // transceivers, one per column lane
  output logic [NCOL-1:0]   pll_powerdown,
  output logic [NCOL-1:0]   tx_analogreset,
  output logic [NCOL-1:0]   tx_digitalreset,
  output logic [NCOL-1:0]   rx_analogreset,
  output logic [NCOL-1:0]   rx_digitalreset,
  input  logic [NCOL-1:0]   pll_locked,
  input  logic [NCOL-1:0]   rx_is_lockedtodata,
  output logic [LW-1:0]     tx_parallel_data [NCOL],
  output logic [KW-1:0]     tx_datak         [NCOL],
  input  logic [LW-1:0]     rx_parallel_data [NCOL],
  input  logic [KW-1:0]     rx_datak         [NCOL],
  input  logic [KW-1:0]     rx_syncstatus    [NCOL],
  // trigger and busy
  input  logic              trig,
  output logic              busy,
  // towards the DDL2 source interface unit
  output logic              ddl_valid,
  output logic [LW-1:0]     ddl_data,
  output logic              ddl_last,
  input  logic              ddl_ready,
  // status
  output logic [NCOL-1:0]   lane_up,
  output logic [15:0]       accepted,
  output logic [15:0]       rejected,
  output logic [15:0]       events_sent,
  output logic [15:0]       lane_errors,
  output logic [15:0]       overruns_total,
  output logic [31:0]       last_busy_cycles
);
  localparam int unsigned AW = $clog2(BUF_DEPTH);

  logic [NCOL-1:0] tx_ready, rx_ready;
  logic [NCOL-1:0] frame_valid, lane_err;
  logic [15:0]     nwords   [NCOL];
  logic [15:0]     lane_evid[NCOL];
  logic [3:0]      lane_col [NCOL];
  logic [15:0]     overruns [NCOL];
  logic [LW-1:0]   rd_data  [NCOL];
  logic [AW-1:0]   rd_addr;
  logic            release_frame, event_sent, builder_busy;
  logic            cmd_valid;
  logic [15:0]     cmd_event_id;
  lane_word_t      down_w  [NCOL];
  lane_word_t      up_w    [NCOL];
  logic [NCOL-1:0] rx_sync;

  for (genvar c = 0; c < NCOL; c++) begin : g_lane
    xcvr_reset_ctrl #(.T_PD(T_PD), .T_DIG(T_DIG), .T_LTD(T_LTD)) u_rst (
      .clk, .rst_n,
      .pll_locked        (pll_locked[c]),
      .rx_is_lockedtodata(rx_is_lockedtodata[c]),
      .pll_powerdown     (pll_powerdown[c]),
      .tx_analogreset    (tx_analogreset[c]),
      .tx_digitalreset   (tx_digitalreset[c]),
      .rx_analogreset    (rx_analogreset[c]),
      .rx_digitalreset   (rx_digitalreset[c]),
      .tx_ready          (tx_ready[c]),
      .rx_ready          (rx_ready[c])
    );

    // the downstream FIFO only ever holds readout commands, which are rare,
    // so it is never full and its room signal is not needed
    lane_sync u_sync (
      .clk, .rst_n,
      .tx_in           (down_w[c]),
      .tx_adv          (),
      .rx_out          (up_w[c]),
      .rx_sync         (rx_sync[c]),
      .xcvr_clk,
      .tx_parallel_data(tx_parallel_data[c]),
      .tx_datak        (tx_datak[c]),
      .rx_parallel_data(rx_parallel_data[c]),
      .rx_datak        (rx_datak[c]),
      .rx_syncstatus   (rx_syncstatus[c])
    );

    assign lane_up[c] = tx_ready[c] && rx_ready[c] && rx_sync[c];

    lane_rx #(.DEPTH(BUF_DEPTH)) u_rx (
      .clk, .rst_n,
      .link_up         (lane_up[c]),
      .rx_parallel_data(up_w[c].data),
      .rx_datak        (up_w[c].datak),
      .frame_valid     (frame_valid[c]),
      .col_id          (lane_col[c]),
      .event_id        (lane_evid[c]),
      .nwords          (nwords[c]),
      .err             (lane_err[c]),
      .release_frame   (release_frame),
      .overruns        (overruns[c]),
      .rd_addr         (rd_addr),
      .rd_data         (rd_data[c])
    );

    // downstream: readout command or fill word
    always_ff @(posedge clk) begin
      if (!rst_n || !tx_ready[c]) begin
        down_w[c].data  <= IDLE_WORD;
        down_w[c].datak <= DATAK_CTRL;
      end else if (cmd_valid) begin
        down_w[c].data  <= {8'h00, cmd_event_id, K28_0};
        down_w[c].datak <= DATAK_CTRL;
      end else begin
        down_w[c].data  <= IDLE_WORD;
        down_w[c].datak <= DATAK_CTRL;
      end
    end
  end

  trigger_ctrl u_trig (
    .clk, .rst_n,
    .trig,
    .links_up        (&lane_up),
    .event_sent      (event_sent),
    .cmd_valid       (cmd_valid),
    .cmd_event_id    (cmd_event_id),
    .busy            (busy),
    .accepted        (accepted),
    .rejected        (rejected),
    .last_busy_cycles(last_busy_cycles)
  );

  event_builder #(.NCOL(NCOL), .DEPTH(BUF_DEPTH), .SEG_ID(SEG_ID)) u_build (
    .clk, .rst_n,
    .event_id     (cmd_event_id),
    .frame_valid  (frame_valid),
    .nwords       (nwords),
    .lane_evid    (lane_evid),
    .lane_err     (lane_err),
    .rd_addr      (rd_addr),
    .rd_data      (rd_data),
    .release_frame(release_frame),
    .ddl_valid, .ddl_data, .ddl_last, .ddl_ready,
    .event_sent   (event_sent),
    .busy         (builder_busy)
  );

  // a lane error is a bad frame, a column number that does not match the
  // lane, or a frame that arrived while the previous one was still held
  logic [NCOL-1:0] bad;
  always_comb begin
    overruns_total = '0;
    for (int c = 0; c < NCOL; c++) begin
      bad[c]    = lane_err[c] || (lane_col[c] != 4'(c));
      overruns_total = overruns_total + overruns[c];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      events_sent <= '0;
      lane_errors <= '0;
    end else if (release_frame) begin
      events_sent <= events_sent + 1'b1;
      lane_errors <= lane_errors + 16'($countones(bad)) ;
    end
  end

  ap_builder_inside_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                           builder_busy |-> busy);
endmodule
