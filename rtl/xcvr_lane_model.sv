// xcvr_lane_model: behavioural model of one direction of a 3.125 Gb/s lane.
//
// This is a behavioural model, not logic for the FPGA fabric. It stands for
// the transmit half of a hard transceiver (32-bit parallel interface, 8b/10b,
// serialiser, transmit PLL), the cable and the receive half at the other end
// (clock-data recovery, word aligner, deserialiser). In the real system these
// are vendor transceiver blocks; the model reproduces what the user logic sees:
//   - pll_locked rises PLL_LOCK cycles after pll_powerdown is released;
//   - rx_is_lockedtodata rises CDR_LOCK cycles after rx_analogreset is released
//     while the far transmitter is running;
//   - words entered on tx_parallel_data/tx_datak come out on
//     rx_parallel_data/rx_datak LAT cycles later; the receive outputs are 0
//     while the receiver is in reset or not locked;
//   - the word aligner sets rx_syncstatus (4'hF) at the first K28.5 comma seen
//     in byte 0 after rx_digitalreset is released; rx_patterndetect flags each
//     byte that is a K28.5 comma.
// Both ends use one clock here, the lane's parallel word clock (78.125 MHz for
// 3.125 Gb/s with 8b/10b and 32-bit words); all times above count its cycles.
// The separate oscillators of the two FPGAs and the clock recovery of the real
// transceivers are not modelled. The reset inputs come from the logic clock
// domain and are only sampled; they change rarely. Port names
// follow the transceiver signals shown in the prototype's logic analyser
// capture (tx_parallel_data, rx_parallel_data, rx_patterndetect,
// rx_syncstatus, tx_analogreset, tx_datak). The model has no reset of its
// own: it starts unlocked because pll_powerdown and rx_analogreset are held
// high by the reset controllers at power-up, and the pipeline is flushed
// before the receiver reports lock (CDR_LOCK > LAT).
module xcvr_lane_model #(
  parameter int unsigned LAT      = 8,
  parameter int unsigned PLL_LOCK = 50,
  parameter int unsigned CDR_LOCK = 80
) (
  input  logic        clk,
  // transmit end
  input  logic        pll_powerdown,
  input  logic        tx_analogreset,
  input  logic        tx_digitalreset,
  output logic        pll_locked,
  input  logic [31:0] tx_parallel_data,
  input  logic [3:0]  tx_datak,
  // receive end
  input  logic        rx_analogreset,
  input  logic        rx_digitalreset,
  output logic        rx_is_lockedtodata,
  output logic [31:0] rx_parallel_data,
  output logic [3:0]  rx_datak,
  output logic [3:0]  rx_syncstatus,
  output logic [3:0]  rx_patterndetect
);
  logic [35:0] pipe [LAT];
  logic [$clog2(PLL_LOCK+1)-1:0] pll_cnt;
  logic [$clog2(CDR_LOCK+1)-1:0] cdr_cnt;
  logic        sync;
  logic        tx_running;
  logic [35:0] line_out;

  assign tx_running = pll_locked && !tx_analogreset;
  assign line_out   = pipe[LAT-1];

  always_ff @(posedge clk) begin
    if (pll_powerdown) begin
      pll_cnt    <= '0;
      pll_locked <= 1'b0;
    end else if (pll_cnt == ($bits(pll_cnt))'(PLL_LOCK)) begin
      pll_locked <= 1'b1;
    end else pll_cnt <= pll_cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rx_analogreset || !tx_running) begin
      cdr_cnt            <= '0;
      rx_is_lockedtodata <= 1'b0;
    end else if (cdr_cnt == ($bits(cdr_cnt))'(CDR_LOCK)) begin
      rx_is_lockedtodata <= 1'b1;
    end else cdr_cnt <= cdr_cnt + 1'b1;
  end

  // the line: what the transmitter sends, LAT cycles of latency
  always_ff @(posedge clk) begin
    pipe[0] <= (tx_running && !tx_digitalreset) ? {tx_datak, tx_parallel_data} : '0;
    for (int i = 1; i < LAT; i++) pipe[i] <= pipe[i-1];
  end

  // receive outputs and word aligner
  always_ff @(posedge clk) begin
    if (rx_digitalreset || !rx_is_lockedtodata) begin
      sync             <= 1'b0;
      rx_parallel_data <= '0;
      rx_datak         <= '0;
      rx_patterndetect <= '0;
    end else begin
      rx_parallel_data <= line_out[31:0];
      rx_datak         <= line_out[35:32];
      for (int b = 0; b < 4; b++)
        rx_patterndetect[b] <= line_out[32+b] && (line_out[8*b +: 8] == 8'hBC);
      if (line_out[32] && line_out[7:0] == 8'hBC) sync <= 1'b1;
    end
  end
  assign rx_syncstatus = {4{sync}};
endmodule
