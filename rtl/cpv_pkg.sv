// cpv_pkg: types and constants shared by the CPV/HMPID front-end readout.
//
// The readout has three levels: Dilogic chips deliver 18-bit words (12-bit
// amplitude plus channel address) to a column controller; each column
// controller sends its event as a frame of 32-bit words over one serial lane
// to the segment controller; the segment controller builds the event block
// (CDH, CPV header, column headers, Dilogic markers, segment marker) and hands
// it to the DDL2 source interface unit.
//
// Taken from the proposal: 18-bit Dilogic words with a 12-bit amplitude, 32-bit
// lane words, 10 Dilogic chips and 480 pads per column in two groups of five,
// 8 columns per segment, the header sizes (CDH 10 words, CPV header 5 words,
// one column header per column, one marker per Dilogic, one segment marker),
// and the 0xAA5507BC fill word. Everything else here, the bit layouts of the
// markers and headers and the control characters that frame a lane transfer,
// is this design's own choice.
package cpv_pkg;

  // ---------------- Dilogic side ----------------
  localparam int unsigned DIL_W      = 18;  // IOBUS width
  localparam int unsigned AMP_W      = 12;  // digitised amplitude
  localparam int unsigned CHAN_W     = 6;   // channel address in a Dilogic (48 channels)
  localparam int unsigned CHIPS_PER_GROUP = 5;
  localparam int unsigned GROUPS_PER_COL  = 2;
  localparam int unsigned CHAN_PER_CHIP   = 48;  // 480 pads / 10 chips

  // A Dilogic word: {chan[5:0], amp[11:0]}. A chip ends its part of the event
  // with a marker word whose channel field is all ones:
  // {6'h3F, chip[3:0], 2'b00, nhits[5:0]}.
  localparam logic [CHAN_W-1:0] MARKER_CHAN = 6'h3F;

  function automatic logic is_marker(input logic [DIL_W-1:0] w);
    return w[DIL_W-1 -: CHAN_W] == MARKER_CHAN;
  endfunction

  function automatic logic [DIL_W-1:0] make_marker(input logic [3:0] chip,
                                                   input logic [5:0] nhits);
    return {MARKER_CHAN, chip, 2'b00, nhits};
  endfunction

  // ---------------- serial lane ----------------
  localparam int unsigned LW = 32;          // parallel word of the transceiver
  localparam int unsigned KW = 4;           // one datak bit per byte

  // Control words carry a K character in byte 0 and tx_datak = 4'b0001.
  localparam logic [7:0] K28_5 = 8'hBC;     // comma / fill
  localparam logic [7:0] K28_1 = 8'h3C;     // start of frame
  localparam logic [7:0] K28_3 = 8'h7C;     // end of frame
  localparam logic [7:0] K28_0 = 8'h1C;     // readout command (trigger)
  localparam logic [KW-1:0] DATAK_CTRL = 4'b0001;
  localparam logic [KW-1:0] DATAK_DATA = 4'b0000;

  // Fill word sent between frames; its low byte is the K28.5 comma.
  localparam logic [LW-1:0] IDLE_WORD = 32'hAA5507BC;

  typedef struct packed {
    logic [LW-1:0] data;
    logic [KW-1:0] datak;
  } lane_word_t;

  // SOF: {col[3:0], 4'h0, event_id[15:0], K28.1}
  // EOF: {8'h00, nwords[15:0], K28.3}  (payload words between SOF and EOF)
  // CMD: {8'h00, event_id[15:0], K28.0}
  function automatic lane_word_t ctrl_word(input logic [23:0] payload,
                                           input logic [7:0] k);
    lane_word_t w;
    w.data  = {payload, k};
    w.datak = DATAK_CTRL;
    return w;
  endfunction

  function automatic logic is_ctrl(input lane_word_t w, input logic [7:0] k);
    return (w.datak == DATAK_CTRL) && (w.data[7:0] == k);
  endfunction

  // Payload word of a column frame:
  // {col[3:0], dilogic[3:0], 6'b0, dilogic_word[17:0]}
  function automatic logic [LW-1:0] payload_word(input logic [3:0] col,
                                                 input logic [3:0] dil,
                                                 input logic [DIL_W-1:0] w);
    return {col, dil, 6'b0, w};
  endfunction

  // ---------------- event block ----------------
  localparam int unsigned CDH_WORDS  = 10;
  localparam int unsigned CPVH_WORDS = 5;
  localparam logic [7:0] CDH_VERSION = 8'h03;
  localparam logic [7:0] CPVH_TAG    = 8'hC5;
  localparam logic [7:0] COLH_TAG    = 8'hCC;
  localparam logic [7:0] SEGM_TAG    = 8'h5E;

endpackage
