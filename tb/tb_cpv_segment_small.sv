// tb_cpv_segment_small: the end-to-end test of tb_cpv_segment on a segment
// of two columns whose Dilogic FIFOs hold only 16 words, so that the frame
// transmitter cannot keep up with two groups at once and the Dilogic strobes
// must stall; no word may be lost. See tb_cpv_segment_body.svh.
module tb_cpv_segment_small;
  import cpv_pkg::*;
  import tb_dil_pkg::*;
  localparam int NCOL = 2;
  localparam bit FIFO_STALL_EXPECTED = 1'b1;

  `include "tb_cpv_segment_body.svh"

  task automatic end_test;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  cpv_segment #(.NCOL(NCOL), .FIFO_DEPTH(16)) dut (
    .clk, .rst_n, .xcvr_clk(xclk), .dil_en_in_n(en_in_n), .dil_strin_n(strin_n), .dil_iobus(iobus),
    .dil_en_out(en_out), .trig, .busy, .ddl_valid(dv), .ddl_data(dd), .ddl_last(dl),
    .ddl_ready(dr), .links_up, .accepted(acc), .rejected(rej), .events_sent(sent),
    .lane_errors(lerrs), .last_busy_cycles(lbc), .fifo_stalls(stalls),
    .fill_in_frame(fills), .cmd_dropped(dropped), .lane_overruns(ovr), .columns_busy(cols_busy));
endmodule
