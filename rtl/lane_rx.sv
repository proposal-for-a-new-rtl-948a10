// lane_rx: receiver of one column lane in the segment controller.
//
// It watches the word stream of one column, finds a frame (SOF ... EOF), and
// writes the frame's payload words into the column's 32-bit RAM buffer at
// addresses 0, 1, 2, ... Fill words are skipped wherever they appear. At EOF
// the received word count is compared with the count the column sent; the
// frame is then marked complete (frame_valid), with its column number, event
// number, word count and an error flag, until the event builder has read the
// buffer and pulses release.
//
// Errors (err goes high with frame_valid): a count mismatch at EOF, more
// payload words than the buffer holds (the excess is dropped), or a new SOF
// before the EOF (the frame restarts). A SOF that arrives while the previous
// frame has not been released is dropped and counted in overruns; the busy
// rule of the trigger controller keeps this from happening in normal running.
//
// Timing: one payload word per clock is accepted. The read port is
// synchronous: rd_data shows the word at rd_addr one cycle later.
//
// From the proposal: the segment controller's physical layer of eight lanes
// and its RAM buffers, filled from the column controllers' RAM. The buffer depth
// default of 2048 words is the size of the block transferred in the
// prototype's RAM-to-RAM measurement. The framing is this design's own.
module lane_rx
  import cpv_pkg::*;
#(
  parameter int unsigned DEPTH = 2048
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      link_up,
  input  logic [LW-1:0]             rx_parallel_data,
  input  logic [KW-1:0]             rx_datak,
  // completed frame
  output logic                      frame_valid,
  output logic [3:0]                col_id,
  output logic [15:0]               event_id,
  output logic [15:0]               nwords,
  output logic                      err,
  input  logic                      release_frame,
  output logic [15:0]               overruns,
  // buffer read port
  input  logic [$clog2(DEPTH)-1:0]  rd_addr,
  output logic [LW-1:0]             rd_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [LW-1:0] mem [DEPTH];
  lane_word_t    w;
  logic          in_frame, wr_en, ovf;
  logic [15:0]   cnt;

  assign w     = '{data: rx_parallel_data, datak: rx_datak};
  assign wr_en = link_up && in_frame && (w.datak == DATAK_DATA) && (32'(cnt) < DEPTH);

  always_ff @(posedge clk) begin
    if (wr_en) mem[cnt[AW-1:0]] <= w.data;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_frame    <= 1'b0;
      ovf         <= 1'b0;
      cnt         <= '0;
      frame_valid <= 1'b0;
      col_id      <= '0;
      event_id    <= '0;
      nwords      <= '0;
      err         <= 1'b0;
      overruns    <= '0;
    end else begin
      if (release_frame) frame_valid <= 1'b0;
      if (link_up) begin
        if (is_ctrl(w, K28_1)) begin
          if (frame_valid && !release_frame) begin
            overruns <= overruns + 1'b1;
            in_frame <= 1'b0;
          end else begin
            // a SOF inside a frame restarts it and is remembered as an error
            ovf      <= in_frame;
            in_frame <= 1'b1;
            cnt      <= '0;
            col_id   <= w.data[31:28];
            event_id <= w.data[23:8];
          end
        end else if (in_frame && is_ctrl(w, K28_3)) begin
          in_frame    <= 1'b0;
          frame_valid <= 1'b1;
          nwords      <= (32'(cnt) < DEPTH) ? cnt : 16'(DEPTH);
          err         <= ovf || (w.data[23:8] != cnt);
          ovf         <= 1'b0;
        end else if (in_frame && w.datak == DATAK_DATA) begin
          if (32'(cnt) < DEPTH) cnt <= cnt + 1'b1;
          else begin
            ovf <= 1'b1;
            cnt <= cnt + 1'b1;
          end
        end
      end else begin
        in_frame <= 1'b0;
      end
    end
  end
endmodule
