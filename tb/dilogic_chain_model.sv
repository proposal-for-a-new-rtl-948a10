// dilogic_chain_model: behavioural model of five daisy-chained Dilogic chips
// on one IOBUS, for simulation only.
//
// While EnIn_N of the first chip is low the chain owns a read token. At each
// clock edge where StrIn_N is low the chip holding the token drives its next
// word on the bus: its hits {channel, amplitude} first, then its marker
// {6'h3F, chip, 2'b00, nhits}; with the marker it raises EnOut and the token
// moves to the next chip. EnOut of the last chip is the en_out_last output.
// Raising EnIn_N clears the chain for the next event. The hits per chip and
// the data seed are inputs, so a testbench can change them between events.
// A strobe while EnIn_N is high, or after the last chip is done, is counted
// in proto_errors.
module dilogic_chain_model
  import cpv_pkg::*;
  import tb_dil_pkg::*;
#(
  parameter int unsigned FIRST_CHIP = 1
) (
  input  logic              clk,
  input  logic              en_in_n,
  input  logic              strin_n,
  output logic [DIL_W-1:0]  iobus,
  output logic              en_out_last,
  input  int unsigned       nhits [5],
  input  int unsigned       seed,
  output int unsigned       proto_errors,
  output int unsigned       strobes
);
  int unsigned cur, pos;

  initial begin
    cur = 0; pos = 0; iobus = '0; en_out_last = 1'b0; proto_errors = 0; strobes = 0;
  end

  always @(posedge clk) begin
    if (en_in_n) begin
      cur <= 0;
      pos <= 0;
      en_out_last <= 1'b0;
      if (!strin_n) proto_errors <= proto_errors + 1;
    end else if (!strin_n) begin
      strobes <= strobes + 1;
      if (cur >= 5) proto_errors <= proto_errors + 1;
      else if (pos < nhits[cur]) begin
        iobus <= hit_word(seed, FIRST_CHIP + cur, pos);
        pos   <= pos + 1;
      end else begin
        iobus <= make_marker(4'(FIRST_CHIP + cur), 6'(nhits[cur]));
        pos   <= 0;
        cur   <= cur + 1;
        if (cur == 4) en_out_last <= 1'b1;
      end
    end
  end
endmodule
