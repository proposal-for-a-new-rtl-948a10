// event_builder: assembles the event block of one segment and streams it out.
//
// When every column lane of the segment holds a complete frame, the builder
// sends, as 32-bit words on a valid/ready stream towards the DDL2 source
// interface unit:
//   CDH, 10 words        w0 block length in bytes
//                        w1 {CDH_VERSION, SEG_ID, event_id}
//                        w2..w9 zero (trigger and status fields not filled)
//   CPV header, 5 words  w0 {0xC5, SEG_ID, event_id}
//                        w1 total payload words of all columns
//                        w2 lane error mask (bit c: column c's frame was bad)
//                        w3 {event ids differ flag, 15'b0, NCOL}
//                        w4 zero
//   for each column c:   column header {0xCC, c[3:0], 4'b0, nwords}
//                        the column's payload words: Dilogic hits and the
//                        Dilogic markers, as the column sent them
//   segment marker       {0x5E, SEG_ID, event_id}  (ddl_last = 1)
// After the last column's words have been read it releases all lane buffers
// (release_frame), and event_sent pulses when the segment marker is accepted.
//
// Timing: one word per clock while ddl_ready is high. The lane buffers have a
// one-cycle read; the builder issues a read only when its 4-word output FIFO
// has room for it and for the read in flight, so back-pressure never loses a
// word. An event of P payload words has 16 + NCOL + P words and leaves in
// about 17 + 2*NCOL + P cycles: one cycle is lost at the end of each column.
//
// From the proposal: the parts of the data block (CDH of 10 words, CPV header
// of 5 words, one header per column, one marker per Dilogic, one marker per
// segment) and the segment memory buffer holding them. The order of the parts,
// the field layouts and the stream handshake are this design's own.
module event_builder
  import cpv_pkg::*;
#(
  parameter int unsigned NCOL   = 8,
  parameter int unsigned DEPTH  = 2048,
  parameter logic [7:0]  SEG_ID = 8'd0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [15:0]               event_id,
  // lane buffers
  input  logic [NCOL-1:0]           frame_valid,
  input  logic [15:0]               nwords   [NCOL],
  input  logic [15:0]               lane_evid[NCOL],
  input  logic [NCOL-1:0]           lane_err,
  output logic [$clog2(DEPTH)-1:0]  rd_addr,
  input  logic [LW-1:0]             rd_data  [NCOL],
  output logic                      release_frame,
  // output stream
  output logic                      ddl_valid,
  output logic [LW-1:0]             ddl_data,
  output logic                      ddl_last,
  input  logic                      ddl_ready,
  output logic                      event_sent,
  output logic                      busy
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = (NCOL > 1) ? $clog2(NCOL) : 1;

  typedef enum logic [2:0] {B_IDLE, B_CDH, B_CPVH, B_COLH, B_COLD, B_SEGM, B_DRAIN} bstate_t;
  bstate_t state;

  logic [3:0]    idx;
  logic [CW-1:0] col;
  logic [15:0]   addr;
  logic [31:0]   total;
  logic          evid_mismatch;

  // issue stage
  logic          iss;          // a word is issued this cycle
  logic          iss_ram;      // ... read from the lane buffer
  logic [LW-1:0] iss_word;
  logic          iss_last;
  // read in flight
  logic          s1_valid, s1_ram, s1_last;
  logic [CW-1:0] s1_col;
  logic [LW-1:0] s1_word;
  // output FIFO
  logic          of_wr, of_empty;
  logic [LW:0]   of_wdata, of_rdata;
  logic [2:0]    of_count;
  logic          room;

  always_comb begin
    total = 0;
    evid_mismatch = 1'b0;
    for (int c = 0; c < NCOL; c++) begin
      total = total + 32'(nwords[c]);
      if (lane_evid[c] != event_id) evid_mismatch = 1'b1;
    end
  end

  assign room = (32'(of_count) + 32'(s1_valid)) < 4;
  assign busy = (state != B_IDLE);

  always_comb begin
    iss      = 1'b0;
    iss_ram  = 1'b0;
    iss_last = 1'b0;
    iss_word = '0;
    unique case (state)
      B_CDH: begin
        iss = room;
        unique case (idx)
          4'd0:    iss_word = (total + CDH_WORDS + CPVH_WORDS + NCOL + 1) << 2;
          4'd1:    iss_word = {CDH_VERSION, SEG_ID, event_id};
          default: iss_word = '0;
        endcase
      end
      B_CPVH: begin
        iss = room;
        unique case (idx)
          4'd0:    iss_word = {CPVH_TAG, SEG_ID, event_id};
          4'd1:    iss_word = total;
          4'd2:    iss_word = 32'(lane_err);
          4'd3:    iss_word = {evid_mismatch, 15'b0, 16'(NCOL)};
          default: iss_word = '0;
        endcase
      end
      B_COLH: begin
        iss      = room;
        iss_word = {COLH_TAG, 4'(col), 4'b0, nwords[col]};
      end
      B_COLD: begin
        iss     = room && (addr < nwords[col]);
        iss_ram = 1'b1;
      end
      B_SEGM: begin
        iss      = room;
        iss_last = 1'b1;
        iss_word = {SEGM_TAG, SEG_ID, event_id};
      end
      default: ;
    endcase
  end

  assign rd_addr = addr[AW-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= B_IDLE;
      idx           <= '0;
      col           <= '0;
      addr          <= '0;
      release_frame <= 1'b0;
    end else begin
      release_frame <= 1'b0;
      unique case (state)
        B_IDLE: if (&frame_valid) begin
          state <= B_CDH;
          idx   <= '0;
        end
        B_CDH: if (iss) begin
          if (idx == 4'(CDH_WORDS - 1)) begin
            idx   <= '0;
            state <= B_CPVH;
          end else idx <= idx + 1'b1;
        end
        B_CPVH: if (iss) begin
          if (idx == 4'(CPVH_WORDS - 1)) begin
            idx   <= '0;
            col   <= '0;
            state <= B_COLH;
          end else idx <= idx + 1'b1;
        end
        B_COLH: if (iss) begin
          addr  <= '0;
          state <= B_COLD;
        end
        B_COLD: begin
          if (iss) addr <= addr + 1'b1;
          else if (addr >= nwords[col]) begin
            if (col == CW'(NCOL - 1)) state <= B_SEGM;
            else begin
              col   <= col + 1'b1;
              state <= B_COLH;
            end
          end
        end
        B_SEGM: if (iss) begin
          release_frame <= 1'b1;
          state         <= B_DRAIN;
        end
        B_DRAIN: if (event_sent) state <= B_IDLE;
        default: state <= B_IDLE;
      endcase
    end
  end

  // one stage for the buffer read, then into the output FIFO
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_ram   <= 1'b0;
      s1_last  <= 1'b0;
      s1_col   <= '0;
      s1_word  <= '0;
    end else begin
      s1_valid <= iss;
      s1_ram   <= iss_ram;
      s1_last  <= iss_last;
      s1_col   <= col;
      s1_word  <= iss_word;
    end
  end

  assign of_wr    = s1_valid;
  assign of_wdata = {s1_last, s1_ram ? rd_data[s1_col] : s1_word};

  sync_fifo #(.WIDTH(LW + 1), .DEPTH(4)) u_ofifo (
    .clk, .rst_n,
    .wr_en  (of_wr),
    .wr_data(of_wdata),
    .rd_en  (ddl_ready),
    .rd_data(of_rdata),
    .empty  (of_empty),
    .full   (),
    .count  (of_count)
  );

  assign ddl_valid  = !of_empty;
  assign ddl_data   = of_rdata[LW-1:0];
  assign ddl_last   = of_rdata[LW];
  assign event_sent = ddl_valid && ddl_ready && ddl_last;

  ap_stream_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                     ddl_valid && !ddl_ready |=> ddl_valid && $stable(ddl_data));
endmodule
