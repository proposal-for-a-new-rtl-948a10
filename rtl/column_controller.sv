// column_controller: the FPGA column controller of one detector column.
//
// A column has 480 pads read by ten Dilogic chips on two 5-Dilogic cards. The
// controller reads both cards at the same time over two independent 18-bit
// buses (IOBUS_1 for Dilogic 1-5, IOBUS_2 for Dilogic 6-10), which halves the
// readout time against one daisy chain of ten chips. Each bus has its own
// control section (dilogic_readout) and its own 256 x 18 FIFO; the frame
// transmitter (column_tx) scans both FIFOs and builds one frame of 32-bit
// words, which is collected in the column's 32-bit word RAM (column_ram) and
// then sent to the segment controller in one burst over a full-duplex serial
// lane.
//
// The return direction of the lane carries the readout command: a K28.0
// control word with the event number. When the lane is up (both transceiver
// halves out of reset and the receiver word-aligned) and the column is idle,
// the command starts both Dilogic readouts and the frame transmitter in the
// same cycle; a command that arrives while the column is still busy is counted
// in cmd_dropped and ignored. The transceiver reset sequencer of the lane and
// the clock-crossing FIFOs to the transceiver (lane_sync) are part of this
// controller; everything else runs on clk, and the transceiver's parallel
// interface runs on xcvr_clk.
//
// Timing: the command needs a few cycles of both clocks to cross lane_sync;
// readout starts one cycle after it leaves the receive FIFO. The frame is
// complete in the RAM a few cycles after the slower of the two Dilogic groups
// has delivered its last marker; the burst then leaves at the lane word rate
// (one word per xcvr_clk). The column stays busy until the burst has been
// handed to the lane.
//
// From the proposal: two buses of five Dilogic chips read simultaneously, two
// 256 x 18 FIFOs, a controller that scans them and sends the data over a
// 3.125 Gb/s lane with 32-bit words, a 32-bit word RAM, reset logic for the
// transceiver. The
// command word and the busy rule are this design's own.
module column_controller
  import cpv_pkg::*;
#(
  parameter logic [3:0]  COL_ID      = 4'd0,
  parameter int unsigned FIFO_DEPTH  = 256,
  parameter int unsigned RAM_DEPTH   = 2048,
  parameter int unsigned STRB_NUM    = 3,
  parameter int unsigned STRB_DEN    = 40,
  parameter int unsigned T_PD        = 100,
  parameter int unsigned T_DIG       = 20,
  parameter int unsigned T_LTD       = 400
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              xcvr_clk,
  // transceiver: reset control
  output logic              pll_powerdown,
  output logic              tx_analogreset,
  output logic              tx_digitalreset,
  output logic              rx_analogreset,
  output logic              rx_digitalreset,
  input  logic              pll_locked,
  input  logic              rx_is_lockedtodata,
  // transceiver: data
  output logic [LW-1:0]     tx_parallel_data,
  output logic [KW-1:0]     tx_datak,
  input  logic [LW-1:0]     rx_parallel_data,
  input  logic [KW-1:0]     rx_datak,
  input  logic [KW-1:0]     rx_syncstatus,
  // Dilogic groups: index 0 = Dilogic 1-5 (IOBUS_1), 1 = Dilogic 6-10 (IOBUS_2)
  output logic [1:0]        dil_en_in_n,
  output logic [1:0]        dil_strin_n,
  input  logic [DIL_W-1:0]  dil_iobus [2],
  input  logic [1:0]        dil_en_out,
  // status
  output logic              link_up,
  output logic              busy,
  output logic [15:0]       events,
  output logic [15:0]       frames,
  output logic [15:0]       cmd_dropped,
  output logic [31:0]       fifo_stalls,
  output logic [31:0]       fill_in_frame
);
  logic tx_ready, rx_ready;
  lane_word_t rx_q, tx_w, ram_w;
  logic       tx_adv, ram_adv, ram_busy, rx_sync;
  logic [15:0] unused_bursts;
  logic       cmd, start;
  logic [15:0] ev_id;

  logic [1:0]  rd_busy, rd_done, grp_done, fifo_wr, fifo_rd, fifo_empty;
  logic [DIL_W-1:0] fifo_wdata [2];
  logic [DIL_W-1:0] fifo_rdata [2];
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count [2];
  logic [31:0] stalls [2];
  logic        tx_busy, frame_done;
  logic [15:0] unused_words [2];
  logic [15:0] unused_frame_words;

  xcvr_reset_ctrl #(.T_PD(T_PD), .T_DIG(T_DIG), .T_LTD(T_LTD)) u_rst (
    .clk, .rst_n, .pll_locked, .rx_is_lockedtodata,
    .pll_powerdown, .tx_analogreset, .tx_digitalreset,
    .rx_analogreset, .rx_digitalreset, .tx_ready, .rx_ready
  );

  lane_sync u_sync (
    .clk, .rst_n,
    .tx_in(ram_w), .tx_adv, .rx_out(rx_q), .rx_sync,
    .xcvr_clk, .tx_parallel_data, .tx_datak,
    .rx_parallel_data, .rx_datak, .rx_syncstatus
  );

  assign link_up = tx_ready && rx_ready && rx_sync;
  assign busy    = tx_busy || ram_busy || (|rd_busy);

  // command decode
  assign cmd   = link_up && is_ctrl(rx_q, K28_0);
  assign start = cmd && !busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ev_id       <= '0;
      events      <= '0;
      cmd_dropped <= '0;
      grp_done    <= '0;
      frames      <= '0;
    end else begin
      if (frame_done) frames <= frames + 1'b1;
      if (start) begin
        ev_id    <= rx_q.data[23:8];
        events   <= events + 1'b1;
        grp_done <= '0;
      end else begin
        grp_done <= grp_done | rd_done;
      end
      if (cmd && busy) cmd_dropped <= cmd_dropped + 1'b1;
    end
  end

  for (genvar g = 0; g < 2; g++) begin : g_grp
    dilogic_readout #(
      .FIFO_DEPTH(FIFO_DEPTH), .STRB_NUM(STRB_NUM), .STRB_DEN(STRB_DEN)
    ) u_rd (
      .clk, .rst_n,
      .start       (start),
      .busy        (rd_busy[g]),
      .done        (rd_done[g]),
      .words       (unused_words[g]),
      .stall_cycles(stalls[g]),
      .en_in_n     (dil_en_in_n[g]),
      .strin_n     (dil_strin_n[g]),
      .iobus       (dil_iobus[g]),
      .en_out_last (dil_en_out[g]),
      .fifo_wr     (fifo_wr[g]),
      .fifo_wdata  (fifo_wdata[g]),
      .fifo_count  (fifo_count[g])
    );

    sync_fifo #(.WIDTH(DIL_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en  (fifo_wr[g]),
      .wr_data(fifo_wdata[g]),
      .rd_en  (fifo_rd[g]),
      .rd_data(fifo_rdata[g]),
      .empty  (fifo_empty[g]),
      .full   (),
      .count  (fifo_count[g])
    );
  end

  assign fifo_stalls = stalls[0] + stalls[1];

  // the command is taken one cycle later by the transmitter, so that the event
  // number is already latched
  logic start_q;
  always_ff @(posedge clk) begin
    if (!rst_n) start_q <= 1'b0;
    else        start_q <= start;
  end

  column_tx #(.COL_ID(COL_ID)) u_tx (
    .clk, .rst_n,
    .start        (start_q),
    .tx_adv       (ram_adv),
    .event_id     (ev_id),
    .grp_done     (grp_done),
    .fifo_data    (fifo_rdata),
    .fifo_empty   (fifo_empty),
    .fifo_rd      (fifo_rd),
    .tx_word      (tx_w),
    .busy         (tx_busy),
    .frame_done   (frame_done),
    .frame_words  (unused_frame_words),
    .fill_in_frame(fill_in_frame)
  );

  column_ram #(.DEPTH(RAM_DEPTH)) u_ram (
    .clk, .rst_n,
    .in_word (tx_w),
    .in_adv  (ram_adv),
    .out_word(ram_w),
    .out_adv (tx_adv),
    .busy    (ram_busy),
    .bursts  (unused_bursts)
  );
endmodule
