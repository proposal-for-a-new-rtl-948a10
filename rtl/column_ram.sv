// column_ram: the column controller's 32-bit word RAM, a store-and-forward
// frame buffer between the frame transmitter and the lane.
//
// A frame from column_tx (SOF, payload words, EOF) is stored first: SOF and
// EOF in registers, the payload in a DEPTH x 32 memory (a sync_fifo, since the
// words are written and read in order). Fill words are ignored. Once EOF has
// been stored the whole frame is sent to the lane as one burst: SOF, every
// payload word, EOF, one word in each cycle where out_adv is high. While the
// burst is being sent no new frame is taken (in_adv low), and busy is high.
//
// Interface: in_word/in_adv and out_word/out_adv follow the same rule: a
// word is consumed in a cycle where its adv signal is high, and the producer
// holds it otherwise. out_word is registered and shows the fill word between
// bursts. Timing: the burst starts on the cycle after EOF is stored and takes
// payload + 2 lane words.
//
// From the proposal: a 32-bit word RAM in the column controller, and the
// transfer time it measures from the column controller's RAM to the segment
// controller's RAM. Storing the whole frame before sending it, and the 2048
// word size (taken from the transfer measurement), are this design's reading.
module column_ram
  import cpv_pkg::*;
#(
  parameter int unsigned DEPTH = 2048
) (
  input  logic       clk,
  input  logic       rst_n,
  input  lane_word_t in_word,
  output logic       in_adv,
  output lane_word_t out_word,
  input  logic       out_adv,
  output logic       busy,
  output logic [15:0] bursts
);
  localparam lane_word_t FILL = '{data: IDLE_WORD, datak: DATAK_CTRL};

  typedef enum logic [1:0] {M_STORE, M_SOF, M_DATA} mstate_t;
  mstate_t state;

  lane_word_t sof_q, eof_q;
  logic       wr, rd, empty, full;
  logic [LW-1:0] rdata;

  assign in_adv = (state == M_STORE);
  // an EOF waiting at the input counts too, so that busy has no gap between
  // the transmitter finishing and the burst starting
  assign busy   = (state != M_STORE) || is_ctrl(in_word, K28_3);
  assign wr     = in_adv && (in_word.datak == DATAK_DATA);
  assign rd     = (state == M_DATA) && out_adv && !empty;

  sync_fifo #(.WIDTH(LW), .DEPTH(DEPTH)) u_mem (
    .clk, .rst_n,
    .wr_en  (wr),
    .wr_data(in_word.data),
    .rd_en  (rd),
    .rd_data(rdata),
    .empty  (empty),
    .full   (full),
    .count  ()
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= M_STORE;
      sof_q    <= FILL;
      eof_q    <= FILL;
      out_word <= FILL;
      bursts   <= '0;
    end else begin
      if (state == M_STORE) begin
        if (is_ctrl(in_word, K28_1)) sof_q <= in_word;
        if (is_ctrl(in_word, K28_3)) begin
          eof_q <= in_word;
          state <= M_SOF;
        end
      end
      if (out_adv) begin
        out_word <= FILL;
        unique case (state)
          M_STORE: ;
          M_SOF: begin
            out_word <= sof_q;
            state    <= M_DATA;
          end
          M_DATA: begin
            if (!empty) out_word <= '{data: rdata, datak: DATAK_DATA};
            else begin
              out_word <= eof_q;
              bursts   <= bursts + 1'b1;
              state    <= M_STORE;
            end
          end
          default: state <= M_STORE;
        endcase
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) wr |-> !full)
    else $error("column RAM overflow");
endmodule
