# Parallel front-end readout for the ALICE CPV/HMPID pad chambers

The CPV and HMPID detectors are wire chambers read out through cathode pads.
Each pad goes to a Gassiplex analogue channel and a 12-bit ADC; Dilogic chips
then keep only the pads above threshold and hand out the surviving
(channel, amplitude) pairs over an 18-bit bus. In the original electronics all
ten Dilogic chips of a column sit on one daisy chain and are read one after
the other, at a Dilogic clock of 5 to 20 MHz. That sequential readout limits
the detector to about 10 kHz.

This RTL implements the proposed replacement for one **segment** of the
detector. A segment has 8 columns, and each column has 480 pads and 10
Dilogic chips. The main idea is parallelism at two levels:

* **Inside a column.** The ten chips are split into two chains of five
  (Dilogic 1-5 and 6-10). Each chain has its own 18-bit bus (IOBUS_1, IOBUS_2)
  and its own controller and FIFO, so the two halves are read at the same
  time. This works with the existing 5-Dilogic cards as they are.
* **Across columns.** Every column has its own FPGA column controller and its
  own full-duplex 3.125 Gb/s serial lane to a segment controller. All columns
  therefore move their data at the same time. The segment controller gathers
  the columns, adds headers and markers, and passes the event block on towards
  the DDL2 optical link to the data acquisition system.

With the Dilogic chips clocked at 7.5 MHz and 15 % of the pads hit (72 per
column), a simulated segment is busy for about 15.6 µs per event. That runs from
the trigger to the last word leaving for the DDL. Add the 5 µs analogue
settling of the Gassiplex stage, which is outside this logic, and the result is
roughly 20.6 µs per event, or about 48.5 kHz.

## Block structure

```
cpv_segment (top)
├── column_controller  x NCOL (8)
│   ├── xcvr_reset_ctrl        reset sequence of the column's lane
│   ├── lane_sync              clock-crossing FIFOs to the transceiver
│   │   └── async_fifo   x 2   one per direction
│   ├── dilogic_readout  x 2   one per chain of five Dilogic chips
│   ├── sync_fifo        x 2   256 x 18 bit, one per chain
│   ├── column_tx              scans both FIFOs, builds the event's frame
│   └── column_ram             2048 x 32 bit word RAM, sends the frame as a burst
│       └── sync_fifo
├── xcvr_lane_model    x 2*NCOL  behavioural lane, one per direction per column
└── segment_controller
    ├── xcvr_reset_ctrl  x NCOL
    ├── lane_sync        x NCOL  (each with 2 async_fifo)
    ├── lane_rx          x NCOL  frame receiver + 2048 x 32 bit column buffer
    ├── trigger_ctrl             trigger acceptance, event number, busy
    └── event_builder            CDH, CPV header, column headers, data, marker
        └── sync_fifo            4-word output buffer
cpv_pkg                          widths, word formats, control characters
```

Everything is synthesizable except `xcvr_lane_model`. That module is a model
of the hard transceivers and the cable: it shows the PLL and CDR lock, fixed
latency and word alignment that the user logic sees at a transceiver's 32-bit
parallel interface. A real build replaces it with the FPGA vendor's transceiver
blocks. It is instantiated in the top so that the whole segment can be
simulated end to end.

Three things sit outside the design, at its ports:

* the Dilogic chips and the analogue front end, at `dil_*`;
* the DDL2 source interface unit (SIU), at `ddl_*`;
* the source of the trigger, at `trig`.

## One event, step by step

1. **Trigger.** `trigger_ctrl` accepts a `trig` pulse only if every lane is up
   and the segment is not busy. Otherwise the trigger is rejected and counted.
   An accepted trigger gets the next 16-bit event number and raises `busy`.
2. **Command down the lanes.** On the next cycle every downstream lane carries
   one readout command. This is a control word with K28.0 in byte 0 and the
   event number in bits 23:8. At all other times the downstream lanes carry the
   fill word.
3. **Parallel Dilogic readout.** A column controller that sees the command
   while idle starts both of its `dilogic_readout` units. A command that
   arrives while the column is busy is dropped and counted in `cmd_dropped`.
   Each readout unit pulls `EnIn_N` of its first chip low and then pulses
   `StrIn_N` once per Dilogic clock period. Each word it captures goes into its
   FIFO.
4. **Column frame.** `column_tx` starts its frame as soon as the command
   arrives. It takes FIFO 1 first, then FIFO 2, one word whenever a word is
   waiting, so the frame is built while the chips are still being read.
   `column_ram` stores the frame. Once EOF is in, the RAM sends the whole frame
   to the lane as one burst, at one word per lane clock. The column stays busy
   until the burst has left. Fill words mark the cycles where `column_tx` had
   nothing to take. They are dropped before the RAM and never reach the lane
   inside a burst.
5. **Segment buffers.** Each `lane_rx` writes the payload of its column's
   frame into that column's buffer. It checks the word count carried by the
   EOF word and holds the frame until it has been read.
6. **Event block.** Once every column has delivered, `event_builder` streams
   the block out on `ddl_*` at up to one word per clock, honouring `ddl_ready`.
   It then frees the buffers. When the last word is accepted, `busy` drops.

## The Dilogic chain interface

This is the part of the design that is most its own. Real Dilogic-3 timing is
not reproduced: the protocol below is a simple token-and-strobe scheme. It
uses the signal names of the column-controller layout (`EnIn1_N`/`EnIn6_N`,
`StrIn_N`, `EnOut5`/`EnOut10`, `IOBUS_1`/`IOBUS_2 (0-17)`).

* **Token.** `en_in_n` low gives the read token to chip 1 of the chain. When a
  chip has given out its last word, it raises its `EnOut`, which is the next
  chip's enable. `EnOut` of the fifth chip comes back to the FPGA as
  `en_out_last`.
* **Strobe.** `strin_n` is low for one 100 MHz cycle per word. The strobes
  come from a fractional divider: on average `STRB_NUM/STRB_DEN` strobes per
  clock. The default 3/40 gives 7.5 MHz, which is 13 or 14 clocks between
  strobes.
* **Capture.** The chip with the token puts its next word on the bus after the
  strobe. The FPGA registers the bus and `en_out_last` at its pins and stores
  the word `CAPTURE_DLY` = 3 clocks after it issued the strobe. If
  `en_out_last` is high with that word, the word was the last chip's marker.
  The readout then ends and `EnIn_N` goes high again, which clears the chain.
* **Words.** A hit is `{channel[5:0], amplitude[11:0]}`, with 48 channels per
  chip. A chip ends its part of the event with a marker:
  `{6'h3F, chip[3:0], 2'b00, nhits[5:0]}`. These markers are the "Dilogic
  markers" of the event block, one per chip per event.
* **Back-pressure.** A strobe is issued only if the FIFO has room for its word
  after counting the word in flight and the word being written. Otherwise the
  strobe waits, and `stall_cycles` counts the waiting cycles.

  At the default sizes a stall cannot happen. A full chain holds at most
  5 × 48 hits plus 5 markers, which is 245 words, and the FIFO holds 256. The
  back-pressure only matters if `FIFO_DEPTH` is made smaller.

The configuration path over the bidirectional IOBUS (thresholds, pedestals)
is not implemented. The buses are inputs only.

A chain of W words takes about W × 40/3 clocks. Both chains of a column run
at once, so a column takes as long as its larger half.

## Lane protocol

Each lane carries one 32-bit word per lane clock (`xcvr_clk`, 78.125 MHz,
which is 3.125 Gb/s × 8/10 ÷ 32), with one `datak` bit per byte. Control words have `datak = 4'b0001` and a K character in byte 0:

| word | byte 0 | bits 31:8 | direction |
|---|---|---|---|
| fill | K28.5 (`0xBC`) | `0xAA5507` (the whole word is `0xAA5507BC`) | both |
| SOF | K28.1 (`0x3C`) | `{col[3:0], 4'h0, event[15:0]}` | column → segment |
| EOF | K28.3 (`0x7C`) | `{8'h00, payload_words[15:0]}` | column → segment |
| command | K28.0 (`0x1C`) | `{8'h00, event[15:0]}` | segment → column |

Payload words (`datak = 0`) are `{col[3:0], dilogic[3:0], 6'b0, dilogic_word[17:0]}`,
where `dilogic` is 1 to 10. The transmitter works out the Dilogic number by
counting markers.

Fill words are sent both between frames and inside frames. The receiver
ignores them wherever they appear.

The fill word's low byte is the K28.5 comma. The receiver's word aligner locks
onto it (`rx_syncstatus = 4'hF`). A lane counts as up once its reset
controller has released both halves and the aligner is synchronised.

Lane bring-up is sequenced by `xcvr_reset_ctrl`, in this order:

1. The PLL is powered down for `T_PD` cycles.
2. Once the PLL reports lock, `tx_analogreset` is released, and after `T_DIG`
   cycles `tx_digitalreset`.
3. `rx_analogreset` is released after the PLL lock.
4. `rx_digitalreset` is released once the CDR has been locked to the data for
   `T_LTD` cycles in a row.

If the CDR loses lock, only the receive half restarts. If the PLL loses lock,
the whole sequence restarts. The lock signals come from the transceiver side
and are synchronised into the logic clock first. With the default lane model
the whole segment is up about 680 logic cycles after reset.

### Clock crossing

The logic runs on `clk` (100 MHz) and the transceivers' parallel side on
`xcvr_clk` (78.125 MHz). Each lane end has a `lane_sync` with two dual-clock
FIFOs (`async_fifo`, 16 words, Gray-coded pointers), one per direction.

* **Transmit.** Fill words are dropped before the FIFO. When the FIFO is full,
  the sender (`column_ram` in a column) holds its current word. On the lane side, the FIFO is read every
  lane cycle, and the fill word is sent whenever it is empty. Fill words are
  thus the rate-matching padding, which the framing allows anywhere.
* **Receive.** Words are written only while the aligner reports sync, again
  without fill words. The logic side reads every cycle and sees the fill word
  when nothing is waiting. The logic clock is the faster one, so this FIFO
  cannot overflow.

## Event block format

The segment sends `16 + NCOL + P` 32-bit words per event, where P is the total
number of payload words from all columns:

| words | content |
|---|---|
| CDH, 10 | w0 block length in bytes; w1 `{8'h03, SEG_ID, event}`; w2–w9 zero |
| CPV header, 5 | w0 `{8'hC5, SEG_ID, event}`; w1 P; w2 mask of columns with a bad frame; w3 `{event-number-mismatch flag, 15'b0, NCOL}`; w4 zero |
| per column c | header `{8'hCC, c[3:0], 4'b0, nwords}`, then the column's payload words in order (hits and markers of Dilogic 1–10) |
| segment marker, 1 | `{8'h5E, SEG_ID, event}`, sent with `ddl_last = 1` |

The sizes follow the proposal's event block: a 10-word CDH, a 5-word
CPV header, one header per column, one marker per Dilogic and one per
segment. The proposal does not give the field layouts, so every field value
above is this design's own. In particular the CDH here is only a placeholder
with the right length, not the ALICE Common Data Header. The
trigger-information and status fields of the real CDH have to be filled in
before the block goes to a DAQ.

## Timing and measured behaviour

All results below come from `tb_cpv_segment`, run at the default parameters
with a 100 MHz logic clock and a 78.125 MHz lane clock:

| event | payload words | busy (trigger → last DDL word) |
|---|---|---|
| 15 % occupancy, DDL always ready | 680 | 15.6 µs |
| 15 % occupancy, DDL ready 2/3 of cycles | 696 | 18.9 µs |
| empty (markers only) | 80 | 2.6 µs |
| every pad hit | 3920 | 101.5 µs |

For comparison, the proposal estimates 27.2 µs per event for 15 % occupancy:

| step | estimate |
|---|---|
| Gassiplex analogue readout | 5 µs |
| parallel Dilogic readout | 11.2 µs |
| column transfer | 3 µs |
| DDL2 transfer | 8 µs |

Without the Gassiplex step that budget is 22.2 µs, and the end-to-end test
checks that the busy time stays within it.

A lane moves one 32-bit word per lane clock, which is the 2.5 Gb/s of payload
that a 3.125 Gb/s 8b/10b line carries. At that rate a 2048-word transfer
takes 26.2 µs. The prototype measured 20.2 µs for 2048 words, which is
3.24 Gb/s of payload, more than such a line can carry. `tb_lane_transfer`
repeats the prototype's test with the lane model clocked at 100 MHz, so one
word per logic clock. There, 2048 words arrive in 2059 cycles, which is
20.6 µs, and 320 words (1280 bytes, the proposal's event size at 15 %) arrive
in 3.3 µs.

At 15 % occupancy a column sends about 82 words. The burst from the column
RAM then takes about 1.1 µs after the Dilogic readout, which is the
proposal's separate column-transfer step (estimated at 3 µs).

With the 5 µs Gassiplex step added, 20.6 µs per event is just short of the
50 kHz target (20 µs).

## Departures from the proposal and open points

* **Clocks.** Each FPGA in the prototype has its own 100 MHz logic clock,
  and the transceivers run from 156.25 MHz references. Here one `clk` drives
  the logic of both FPGAs, and one `xcvr_clk` drives both ends of every lane;
  a real receiver would recover the far end's clock instead. The delay lines
  that the proposal mentions next to the synchronisation FIFOs are not
  modelled.
* **Column RAM as a frame buffer.** The proposal only names the column's
  32-bit word RAM. Here it collects one whole frame and then sends it.
  Streaming straight from the Dilogic FIFOs would save about 1 µs per event,
  but would have no RAM-to-RAM transfer as measured in the prototype.
* **No trigger levels.** The L0/L1/L2 trigger levels and their latencies are
  not modelled. One readout trigger starts an event.
* **Own choices for what the proposal leaves open:** the Dilogic protocol and
  marker format, the lane framing and K-character use, the header and marker
  contents, the busy and rejection rules, and the reset timings.
* **Second control section label.** The proposal's layout figure labels the
  second control section "for Dilogics 6 to 7". Its chain and the text both
  give Dilogic 6 to 10, and that is what is built.
* **Block size.** The proposal quotes 1280 bytes per event for the present
  detector. With one 32-bit word per hit, this design sends 2720 bytes per
  segment at 15 % occupancy.
* **Not included:**
  * the Dilogic, Gassiplex and ADC chips;
  * the FPGA PLLs;
  * the transceiver reconfiguration controller;
  * the DDL2 SIU and its optical interface.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `NCOL` | 8 | top, segment, builder | columns per segment |
| `FIFO_DEPTH` | 256 | top, column, readout | words per Dilogic FIFO (18 bits wide) |
| `BUF_DEPTH` | 2048 | top, segment, lane_rx | 32-bit words per column buffer in the segment, and in the column RAM |
| `RAM_DEPTH` | 2048 | column_controller (`DEPTH` in column_ram) | 32-bit words of the column RAM |
| `STRB_NUM`/`STRB_DEN` | 3/40 | top, column, readout | Dilogic strobe rate as a fraction of the clock (7.5 MHz) |
| `SEG_ID` | 0 | top, segment, builder | segment number in the headers |
| `T_PD`, `T_DIG`, `T_LTD` | 100, 20, 400 | reset controllers | power-down, transmit digital delay, CDR lock time (cycles) |
| `LANE_LAT`, `PLL_LOCK`, `CDR_LOCK` | 8, 50, 80 | lane model | lane latency and lock times (lane clock cycles) |
| `COL_ID` | 0 | column_controller, column_tx | column number, set per instance by the top |
| `DEPTH` | 16 | lane_sync, async_fifo | words per clock-crossing FIFO |

## Simulating

Every testbench checks itself. It prints `TB_RESULT checks=N failures=M` and
ends with `$finish`. Example for the full segment:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/cpv_pkg.sv tb/tb_dil_pkg.sv tb/tb_cpv_segment.sv \
  --top-module tb_cpv_segment -o sim
./obj_dir/sim
```

Verilator finds the other modules through `-Irtl -Itb`, because every file
is named after its module. For another testbench, change the last file and
`--top-module`. It runs in well under a second. Verilator has only two
signal states, so everything the design reads is reset explicitly.

| testbench | covers |
|---|---|
| `tb_cpv_segment` | whole segment at default sizes. Five events (15 %, 15 % with DDL back-pressure, empty, full, low). Every block word is checked; also rejected triggers, fill words inside frames, the 22.2 µs budget |
| `tb_cpv_segment_small` | same test with 2 columns and 16-word FIFOs, so the Dilogic strobes stall |
| `tb_column_controller` | one column with two chain models: data, EOF count, parallel readout time, dropped commands |
| `tb_dilogic_readout` | one chain: word order, 7.5 MHz timing, stall with a small FIFO |
| `tb_column_tx` | framing, Dilogic numbering, frame length N + 4 cycles, overlap with the readout, push-back |
| `tb_column_ram` | whole frames out as bursts of N + 2 cycles, slow lane, input held during a burst |
| `tb_lane_rx` | frame reception, count mismatch, overrun, oversize frames |
| `tb_event_builder` | block format, rate, back-pressure |
| `tb_segment_controller` | eight emulated columns, commands, block, error mask |
| `tb_trigger_ctrl` | acceptance rules, busy length |
| `tb_xcvr_reset_ctrl` | reset order and times, loss of lock |
| `tb_xcvr_lane_model` | lock times, word alignment, latency |
| `tb_sync_fifo` | random traffic against a queue |
| `tb_async_fifo` | dual-clock traffic in both clock ratios against a queue; full and empty |
| `tb_lane_sync` | loop-back through both FIFOs: order, fill drop and insertion, push-back, sync |
| `tb_lane_transfer` | 320 and 2048 words through two reset controllers, the lane model and `lane_rx`, at one word per 100 MHz clock |

Test-only files:

* `tb/dilogic_chain_model.sv` models five Dilogic chips using the protocol
  above.
* `tb/tb_dil_pkg.sv` holds the deterministic hit pattern:
  * channel k of chip c is (7k + c) mod 48;
  * the amplitude is a hash of the seed, chip and k.

  Expected data is computed from this package, without looking at the design.
