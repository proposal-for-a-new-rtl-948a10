// column_tx: frame transmitter of the column controller.
//
// It scans the two Dilogic FIFOs of the column and sends their contents to the
// segment controller as one frame of 32-bit words on the column's serial lane:
//   SOF  {col, event_id}            control word, K28.1 in byte 0
//   payload words, FIFO 1 first, then FIFO 2, one per clock while data waits
//   EOF  {number of payload words}  control word, K28.3 in byte 0
// Between frames, and inside a frame while a FIFO is empty but its readout is
// still running, it sends the fill word 0xAA5507BC with datak 0001 (its low byte
// is the K28.5 comma the receiver aligns on). The frame starts as soon as the
// command arrives, so it is built while the Dilogic readout runs: a word is
// taken a cycle after it reaches its FIFO. In the column controller the frame
// goes to the column RAM, which drops the fill words.
//
// Each payload word carries the column number, the Dilogic number (1 to 10,
// counted from the markers seen in the stream) and the 18-bit Dilogic word.
//
// Interface: start (one cycle) with event_id begins a frame; grp_done[g] tells
// that group g has stored its last word; FIFO g is popped with fifo_rd[g]
// (first-word-fall-through). tx_word is registered; it is consumed and
// replaced by the next word in each cycle where tx_adv is high, and held
// otherwise (tx_adv is the room signal of the lane's clock-crossing FIFO).
// frame_done pulses in the first cycle the EOF word is on tx_word.
//
// From the proposal: a controller that scans both FIFOs and sends the data over
// a serial lane as 32-bit words, and the 0xAA5507BC word seen on the lane in the
// prototype. The framing and the word layout are this design's own.
module column_tx
  import cpv_pkg::*;
#(
  parameter logic [3:0] COL_ID = 4'd0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              tx_adv,
  input  logic [15:0]       event_id,
  input  logic [1:0]        grp_done,
  input  logic [DIL_W-1:0]  fifo_data [2],
  input  logic [1:0]        fifo_empty,
  output logic [1:0]        fifo_rd,
  output lane_word_t        tx_word,
  output logic              busy,
  output logic              frame_done,
  output logic [15:0]       frame_words,   // payload words of the last frame
  output logic [31:0]       fill_in_frame  // fill words sent inside frames
);
  typedef enum logic [1:0] {T_IDLE, T_SOF, T_DATA, T_EOF} tstate_t;
  tstate_t state;

  logic [15:0] ev_q;
  logic        grp;
  logic [3:0]  dil;        // 0..4 inside the current group
  logic [15:0] nwords;
  logic        take;
  logic [DIL_W-1:0] cur;

  assign cur     = fifo_data[grp];
  assign take    = (state == T_DATA) && !fifo_empty[grp] && tx_adv;
  assign fifo_rd = take ? (grp ? 2'b10 : 2'b01) : 2'b00;
  assign busy    = (state != T_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= T_IDLE;
      ev_q          <= '0;
      grp           <= 1'b0;
      dil           <= '0;
      nwords        <= '0;
      tx_word       <= '{data: IDLE_WORD, datak: DATAK_CTRL};
      frame_done    <= 1'b0;
      frame_words   <= '0;
      fill_in_frame <= '0;
    end else begin
      frame_done <= 1'b0;
      // the command is accepted even while the lane FIFO is full
      if (state == T_IDLE && start) begin
        ev_q  <= event_id;
        state <= T_SOF;
      end
      if (tx_adv) begin
        tx_word    <= '{data: IDLE_WORD, datak: DATAK_CTRL};
        unique case (state)
          T_IDLE: ;
          T_SOF: begin
            tx_word <= ctrl_word({COL_ID, 4'h0, ev_q}, K28_1);
            grp     <= 1'b0;
            dil     <= '0;
            nwords  <= '0;
            state   <= T_DATA;
          end
          T_DATA: begin
            if (take) begin
              tx_word <= '{data: payload_word(COL_ID, 4'(grp ? 6 : 1) + dil, cur),
                           datak: DATAK_DATA};
              nwords  <= nwords + 1'b1;
              if (is_marker(cur)) dil <= dil + 1'b1;
            end else if (grp_done[grp]) begin
              fill_in_frame <= fill_in_frame + 1'b1;
              if (grp) state <= T_EOF;
              else begin
                grp <= 1'b1;
                dil <= '0;
              end
            end else begin
              fill_in_frame <= fill_in_frame + 1'b1;
            end
          end
          T_EOF: begin
            tx_word     <= ctrl_word({8'h00, nwords}, K28_3);
            frame_done  <= 1'b1;
            frame_words <= nwords;
            state       <= T_IDLE;
          end
          default: state <= T_IDLE;
        endcase
      end
    end
  end
endmodule
