// xcvr_reset_ctrl: reset sequencer for one full-duplex transceiver lane.
//
// Brings a lane out of reset in the order a multi-gigabit transceiver needs:
//   1. hold everything; keep the transmit PLL powered down for T_PD cycles;
//   2. when the PLL reports lock, release tx_analogreset, then after T_DIG
//      cycles tx_digitalreset (tx_ready);
//   3. after the PLL lock also release rx_analogreset; once the receive CDR has
//      been locked to the incoming data for T_LTD cycles, release
//      rx_digitalreset (rx_ready).
// Loss of PLL lock restarts the whole sequence; loss of CDR lock restarts the
// receive half. All outputs are registered. The lock inputs come from the
// transceiver's clock domain and pass through two-flop synchronisers, so the
// sequencer sees them two cycles late.
//
// The proposal only names a transceiver reset controller next to the lane
// logic of both controllers; the sequence and the default times (1 us power
// down, 4 us CDR lock time at 100 MHz) are this design's assumptions, in the
// style of the vendor reset controllers for such transceivers.
module xcvr_reset_ctrl #(
  parameter int unsigned T_PD  = 100,
  parameter int unsigned T_DIG = 20,
  parameter int unsigned T_LTD = 400
) (
  input  logic clk,
  input  logic rst_n,
  input  logic pll_locked,
  input  logic rx_is_lockedtodata,
  output logic pll_powerdown,
  output logic tx_analogreset,
  output logic tx_digitalreset,
  output logic rx_analogreset,
  output logic rx_digitalreset,
  output logic tx_ready,
  output logic rx_ready
);
  typedef enum logic [1:0] {X_PD, X_WAIT_PLL, X_TX_DIG, X_TX_RUN} txst_t;
  typedef enum logic [1:0] {R_HOLD, R_WAIT_CDR, R_RUN} rxst_t;
  txst_t tx_st;
  rxst_t rx_st;
  localparam int unsigned CW = $clog2(T_PD + T_DIG + T_LTD + 2);
  logic [CW-1:0] tx_cnt, rx_cnt;
  logic [1:0] pll_s, cdr_s;
  logic pll_ok, cdr_ok;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pll_s <= '0;
      cdr_s <= '0;
    end else begin
      pll_s <= {pll_s[0], pll_locked};
      cdr_s <= {cdr_s[0], rx_is_lockedtodata};
    end
  end
  assign pll_ok = pll_s[1];
  assign cdr_ok = cdr_s[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_st           <= X_PD;
      tx_cnt          <= '0;
      pll_powerdown   <= 1'b1;
      tx_analogreset  <= 1'b1;
      tx_digitalreset <= 1'b1;
      tx_ready        <= 1'b0;
    end else begin
      unique case (tx_st)
        X_PD: begin
          pll_powerdown   <= 1'b1;
          tx_analogreset  <= 1'b1;
          tx_digitalreset <= 1'b1;
          tx_ready        <= 1'b0;
          if (tx_cnt == CW'(T_PD - 1)) begin
            tx_cnt        <= '0;
            pll_powerdown <= 1'b0;
            tx_st         <= X_WAIT_PLL;
          end else tx_cnt <= tx_cnt + 1'b1;
        end
        X_WAIT_PLL: if (pll_ok) begin
          tx_analogreset <= 1'b0;
          tx_cnt         <= '0;
          tx_st          <= X_TX_DIG;
        end
        X_TX_DIG: begin
          if (!pll_ok) begin
            tx_cnt <= '0;
            tx_st  <= X_PD;
          end else if (tx_cnt == CW'(T_DIG - 1)) begin
            tx_digitalreset <= 1'b0;
            tx_ready        <= 1'b1;
            tx_st           <= X_TX_RUN;
          end else tx_cnt <= tx_cnt + 1'b1;
        end
        X_TX_RUN: if (!pll_ok) begin
          tx_cnt <= '0;
          tx_st  <= X_PD;
        end
        default: tx_st <= X_PD;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_st           <= R_HOLD;
      rx_cnt          <= '0;
      rx_analogreset  <= 1'b1;
      rx_digitalreset <= 1'b1;
      rx_ready        <= 1'b0;
    end else begin
      unique case (rx_st)
        R_HOLD: begin
          rx_analogreset  <= 1'b1;
          rx_digitalreset <= 1'b1;
          rx_ready        <= 1'b0;
          rx_cnt          <= '0;
          if (pll_ok && tx_st != X_PD) begin
            rx_analogreset <= 1'b0;
            rx_st          <= R_WAIT_CDR;
          end
        end
        R_WAIT_CDR: begin
          if (!pll_ok) rx_st <= R_HOLD;
          else if (!cdr_ok) rx_cnt <= '0;
          else if (rx_cnt == CW'(T_LTD - 1)) begin
            rx_digitalreset <= 1'b0;
            rx_ready        <= 1'b1;
            rx_st           <= R_RUN;
          end else rx_cnt <= rx_cnt + 1'b1;
        end
        R_RUN: if (!pll_ok || !cdr_ok) rx_st <= R_HOLD;
        default: rx_st <= R_HOLD;
      endcase
    end
  end

  ap_ready_out_of_reset: assert property (@(posedge clk) disable iff (!rst_n)
                                          rx_ready |-> !rx_digitalreset && !rx_analogreset);
endmodule
