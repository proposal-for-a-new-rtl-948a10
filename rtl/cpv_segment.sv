// cpv_segment: one segment of the CPV front-end readout, end to end.
//
// A CPV module has two segments; a segment has NCOL = 8 detector columns of
// 480 pads each, read by ten Dilogic chips per column. Each column has its
// own column controller, which reads its two groups of five Dilogic chips in
// parallel and sends the data over its own full-duplex serial lane to the
// segment controller; the segment controller builds the event block and
// delivers it towards the DDL2 link. The lanes (transmit PHY, cable, receive
// PHY, one model per direction) are behavioural models of the hard
// transceivers; everything else is synthesizable logic.
//
// Ports: the Dilogic pins of all 2*NCOL groups (index [column][group], group 0
// being Dilogic 1-5 on IOBUS_1 and group 1 Dilogic 6-10 on IOBUS_2), the
// readout trigger, busy, the event stream towards the DDL2 source interface
// unit (ddl_valid/ddl_data/ddl_last/ddl_ready) and status counters. The
// Dilogic chips and the SIU are outside this design.
//
// Timing: clk (100 MHz) drives all controller logic; xcvr_clk (78.125 MHz, the
// parallel word clock of a 3.125 Gb/s 8b/10b lane with 32-bit words) drives
// the transceiver side of every lane, behind the clock-crossing FIFOs. The two
// clocks need no phase or frequency relation, but xcvr_clk must be the slower
// one, so that a receiver never gets words faster than it can take them.
// After reset the
// lanes need a few microseconds (reset sequences, PLL and CDR lock, word
// alignment) before links_up rises and triggers are accepted. A trigger then
// runs: command down the lanes, parallel Dilogic readout at 7.5 MHz, frames
// up the lanes as the words arrive, event building, output at one word per
// clock; busy covers all of it.
//
// From the proposal: the partitioning (8 columns per segment, one controller
// per column, one lane per column, one segment controller), the two parallel
// Dilogic buses per column, the FIFOs, the 3.125 Gb/s lanes with 32-bit words
// and the synchronisation FIFOs between logic and transceivers. Sharing one
// xcvr_clk between both ends of all lanes is a simplification of this design
// (real lanes recover the far end's clock).
module cpv_segment
  import cpv_pkg::*;
#(
  parameter int unsigned NCOL       = 8,
  parameter int unsigned FIFO_DEPTH = 256,
  parameter int unsigned BUF_DEPTH  = 2048,   // 32-bit word RAM per column, at both ends of the lane
  parameter int unsigned STRB_NUM   = 3,
  parameter int unsigned STRB_DEN   = 40,
  parameter logic [7:0]  SEG_ID     = 8'd0,
  parameter int unsigned T_PD       = 100,
  parameter int unsigned T_DIG      = 20,
  parameter int unsigned T_LTD      = 400,
  parameter int unsigned LANE_LAT   = 8,
  parameter int unsigned PLL_LOCK   = 50,
  parameter int unsigned CDR_LOCK   = 80
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              xcvr_clk,
  // Dilogic chains
  output logic [1:0]        dil_en_in_n [NCOL],
  output logic [1:0]        dil_strin_n [NCOL],
  input  logic [DIL_W-1:0]  dil_iobus   [NCOL][2],
  input  logic [1:0]        dil_en_out  [NCOL],
  // trigger, busy
  input  logic              trig,
  output logic              busy,
  // towards the DDL2 SIU
  output logic              ddl_valid,
  output logic [LW-1:0]     ddl_data,
  output logic              ddl_last,
  input  logic              ddl_ready,
  // status
  output logic              links_up,
  output logic [15:0]       accepted,
  output logic [15:0]       rejected,
  output logic [15:0]       events_sent,
  output logic [15:0]       lane_errors,
  output logic [31:0]       last_busy_cycles,
  output logic [31:0]       fifo_stalls,
  output logic [31:0]       fill_in_frame,
  output logic [15:0]       cmd_dropped,
  output logic [15:0]       lane_overruns,
  output logic              columns_busy
);
  // column side of each lane
  logic [NCOL-1:0] c_pll_pd, c_txa, c_txd, c_rxa, c_rxd, c_pll_lk, c_cdr_lk, c_up, c_busy;
  logic [LW-1:0]   c_tx_d [NCOL];
  logic [KW-1:0]   c_tx_k [NCOL];
  logic [LW-1:0]   c_rx_d [NCOL];
  logic [KW-1:0]   c_rx_k [NCOL];
  logic [KW-1:0]   c_rx_s [NCOL];
  logic [KW-1:0]   c_rx_p [NCOL];
  // segment side
  logic [NCOL-1:0] s_pll_pd, s_txa, s_txd, s_rxa, s_rxd, s_pll_lk, s_cdr_lk, s_up;
  logic [LW-1:0]   s_tx_d [NCOL];
  logic [KW-1:0]   s_tx_k [NCOL];
  logic [LW-1:0]   s_rx_d [NCOL];
  logic [KW-1:0]   s_rx_k [NCOL];
  logic [KW-1:0]   s_rx_s [NCOL];
  logic [KW-1:0]   s_rx_p [NCOL];

  logic [15:0] c_events [NCOL];
  logic [15:0] c_frames [NCOL];
  logic [15:0] c_drop   [NCOL];
  logic [31:0] c_stall  [NCOL];
  logic [31:0] c_fill   [NCOL];
  logic [15:0] s_ovr;

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    column_controller #(
      .COL_ID(4'(c)), .FIFO_DEPTH(FIFO_DEPTH), .RAM_DEPTH(BUF_DEPTH),
      .STRB_NUM(STRB_NUM), .STRB_DEN(STRB_DEN),
      .T_PD(T_PD), .T_DIG(T_DIG), .T_LTD(T_LTD)
    ) u_col (
      .clk, .rst_n, .xcvr_clk,
      .pll_powerdown     (c_pll_pd[c]),
      .tx_analogreset    (c_txa[c]),
      .tx_digitalreset   (c_txd[c]),
      .rx_analogreset    (c_rxa[c]),
      .rx_digitalreset   (c_rxd[c]),
      .pll_locked        (c_pll_lk[c]),
      .rx_is_lockedtodata(c_cdr_lk[c]),
      .tx_parallel_data  (c_tx_d[c]),
      .tx_datak          (c_tx_k[c]),
      .rx_parallel_data  (c_rx_d[c]),
      .rx_datak          (c_rx_k[c]),
      .rx_syncstatus     (c_rx_s[c]),
      .dil_en_in_n       (dil_en_in_n[c]),
      .dil_strin_n       (dil_strin_n[c]),
      .dil_iobus         (dil_iobus[c]),
      .dil_en_out        (dil_en_out[c]),
      .link_up           (c_up[c]),
      .busy              (c_busy[c]),
      .events            (c_events[c]),
      .frames            (c_frames[c]),
      .cmd_dropped       (c_drop[c]),
      .fifo_stalls       (c_stall[c]),
      .fill_in_frame     (c_fill[c])
    );

    // column -> segment: the column's transmit PLL, the segment's receiver
    xcvr_lane_model #(.LAT(LANE_LAT), .PLL_LOCK(PLL_LOCK), .CDR_LOCK(CDR_LOCK)) u_up (
      .clk(xcvr_clk),
      .pll_powerdown     (c_pll_pd[c]),
      .tx_analogreset    (c_txa[c]),
      .tx_digitalreset   (c_txd[c]),
      .pll_locked        (c_pll_lk[c]),
      .tx_parallel_data  (c_tx_d[c]),
      .tx_datak          (c_tx_k[c]),
      .rx_analogreset    (s_rxa[c]),
      .rx_digitalreset   (s_rxd[c]),
      .rx_is_lockedtodata(s_cdr_lk[c]),
      .rx_parallel_data  (s_rx_d[c]),
      .rx_datak          (s_rx_k[c]),
      .rx_syncstatus     (s_rx_s[c]),
      .rx_patterndetect  (s_rx_p[c])
    );

    // segment -> column
    xcvr_lane_model #(.LAT(LANE_LAT), .PLL_LOCK(PLL_LOCK), .CDR_LOCK(CDR_LOCK)) u_down (
      .clk(xcvr_clk),
      .pll_powerdown     (s_pll_pd[c]),
      .tx_analogreset    (s_txa[c]),
      .tx_digitalreset   (s_txd[c]),
      .pll_locked        (s_pll_lk[c]),
      .tx_parallel_data  (s_tx_d[c]),
      .tx_datak          (s_tx_k[c]),
      .rx_analogreset    (c_rxa[c]),
      .rx_digitalreset   (c_rxd[c]),
      .rx_is_lockedtodata(c_cdr_lk[c]),
      .rx_parallel_data  (c_rx_d[c]),
      .rx_datak          (c_rx_k[c]),
      .rx_syncstatus     (c_rx_s[c]),
      .rx_patterndetect  (c_rx_p[c])
    );
  end

  segment_controller #(
    .NCOL(NCOL), .BUF_DEPTH(BUF_DEPTH), .SEG_ID(SEG_ID),
    .T_PD(T_PD), .T_DIG(T_DIG), .T_LTD(T_LTD)
  ) u_seg (
    .clk, .rst_n, .xcvr_clk,
    .pll_powerdown     (s_pll_pd),
    .tx_analogreset    (s_txa),
    .tx_digitalreset   (s_txd),
    .rx_analogreset    (s_rxa),
    .rx_digitalreset   (s_rxd),
    .pll_locked        (s_pll_lk),
    .rx_is_lockedtodata(s_cdr_lk),
    .tx_parallel_data  (s_tx_d),
    .tx_datak          (s_tx_k),
    .rx_parallel_data  (s_rx_d),
    .rx_datak          (s_rx_k),
    .rx_syncstatus     (s_rx_s),
    .trig, .busy,
    .ddl_valid, .ddl_data, .ddl_last, .ddl_ready,
    .lane_up           (s_up),
    .accepted, .rejected, .events_sent, .lane_errors,
    .overruns_total    (s_ovr),
    .last_busy_cycles
  );

  assign links_up      = (&s_up) && (&c_up);
  assign lane_overruns = s_ovr;
  assign columns_busy  = |c_busy;

  // status summed over the columns; per-column counters that only repeat the
  // segment's counts (events, frames) are checked in simulation
  always_comb begin
    fifo_stalls   = '0;
    fill_in_frame = '0;
    cmd_dropped   = '0;
    for (int c = 0; c < NCOL; c++) begin
      fifo_stalls   = fifo_stalls + c_stall[c];
      fill_in_frame = fill_in_frame + c_fill[c];
      cmd_dropped   = cmd_dropped + c_drop[c];
    end
  end
endmodule
