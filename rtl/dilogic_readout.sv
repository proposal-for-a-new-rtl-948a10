// dilogic_readout: controller for one group of five daisy-chained Dilogic chips.
//
// The column controller holds two of these, one per IOBUS, so the two halves
// of a column (Dilogic 1-5 and 6-10) are read at the same time. On start the
// controller pulls EnIn_N of the first chip low, which hands the read token to
// the chain. It then pulses StrIn_N low once per Dilogic clock period; at each
// pulse the chip holding the token puts its next word on the 18-bit IOBUS: a
// hit {channel, 12-bit amplitude} or, as its last word, its marker. After its
// marker a chip raises EnOut, which passes the token to the next chip; EnOut
// of the last chip comes back to the controller and ends the readout. Every
// word read is written into the group's FIFO.
//
// Timing: the Dilogic clock is derived from the 100 MHz logic clock by a
// fractional divider, STRB_NUM/STRB_DEN of the clock rate (default 3/40, i.e.
// 7.5 MHz, the rate the proposal's estimates assume), so a group of W words
// takes about W*DEN/NUM clock cycles. StrIn_N is low for one clock cycle per
// word. The bus and EnOut are registered at the pins, and the word is taken
// CAPTURE_DLY cycles after the strobe was issued. When the FIFO has no room a
// strobe is held back (stall) until a word has been popped, so nothing is lost.
//
// Taken from the proposal: five chips per IOBUS, 18-bit bus, EnIn_N, StrIn_N
// and EnOut signal names (Fig. 4), 12-bit amplitude, 7.5 MHz read clock. The
// token/strobe protocol, the marker word and the capture delay are this
// design's assumptions; configuration writes over the IOBUS are not modelled.
module dilogic_readout
  import cpv_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH  = 256,
  parameter int unsigned STRB_NUM    = 3,
  parameter int unsigned STRB_DEN    = 40,
  parameter int unsigned CAPTURE_DLY = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // control
  input  logic                 start,       // one-cycle pulse: read one event
  output logic                 busy,
  output logic                 done,        // one-cycle pulse: last marker stored
  output logic [15:0]          words,       // words read in this event
  output logic [31:0]          stall_cycles,// cycles a strobe waited for FIFO room
  // Dilogic chain pins
  output logic                 en_in_n,     // EnIn_N of the first chip
  output logic                 strin_n,     // StrIn_N, common to the five chips
  input  logic [DIL_W-1:0]     iobus,       // IOBUS (0-17)
  input  logic                 en_out_last, // EnOut of the last chip
  // FIFO write side
  output logic                 fifo_wr,
  output logic [DIL_W-1:0]     fifo_wdata,
  input  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FINISH} state_t;
  state_t state;

  logic [$clog2(STRB_DEN+1)-1:0] acc;
  logic                           tick, strb_req, pending;
  logic [3:0]                     cap_cnt;
  logic [DIL_W-1:0]               iobus_q;
  logic                           en_out_q;
  logic                           room;

  // fractional divider: tick on average STRB_NUM times every STRB_DEN cycles
  assign tick = (state == S_RUN) &&
                (32'(acc) + STRB_NUM >= STRB_DEN);
  // room for the word about to be strobed (a word may be in flight or being written)
  assign room = (32'(fifo_count) + 32'(pending) + 32'(fifo_wr) + 1) <= FIFO_DEPTH;
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    iobus_q  <= iobus;         // pin input registers
    en_out_q <= en_out_last;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      acc          <= '0;
      strb_req     <= 1'b0;
      pending      <= 1'b0;
      cap_cnt      <= '0;
      en_in_n      <= 1'b1;
      strin_n      <= 1'b1;
      done         <= 1'b0;
      words        <= '0;
      stall_cycles <= '0;
      fifo_wr      <= 1'b0;
      fifo_wdata   <= '0;
    end else begin
      done    <= 1'b0;
      fifo_wr <= 1'b0;
      strin_n <= 1'b1;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state    <= S_RUN;
            en_in_n  <= 1'b0;
            words    <= '0;
            acc      <= '0;
            strb_req <= 1'b0;
          end
        end
        S_RUN: begin
          if (tick) acc <= ($bits(acc))'(32'(acc) + STRB_NUM - STRB_DEN);
          else      acc <= ($bits(acc))'(32'(acc) + STRB_NUM);
          // issue a strobe when one is due, none is in flight and there is room
          if ((tick || strb_req) && !pending) begin
            if (room) begin
              strin_n  <= 1'b0;
              pending  <= 1'b1;
              cap_cnt  <= 4'(CAPTURE_DLY - 1);
              strb_req <= 1'b0;
            end else begin
              strb_req     <= 1'b1;
              stall_cycles <= stall_cycles + 1'b1;
            end
          end else if (tick) begin
            strb_req <= 1'b1;
          end
          // capture the word the strobe produced
          if (pending) begin
            if (cap_cnt == 0) begin
              pending    <= 1'b0;
              fifo_wr    <= 1'b1;
              fifo_wdata <= iobus_q;
              words      <= words + 1'b1;
              if (en_out_q) begin
                state   <= S_FINISH;
                en_in_n <= 1'b1;
              end
            end else begin
              cap_cnt <= cap_cnt - 1'b1;
            end
          end
        end
        S_FINISH: begin
          // the last word is being written this cycle
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // StrIn_N is never pulsed while the token is not in the chain
  ap_strobe_in_token: assert property (@(posedge clk) disable iff (!rst_n)
                                       !strin_n |-> !en_in_n);
endmodule
