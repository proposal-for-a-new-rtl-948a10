// tb_cpv_segment: end-to-end test of one full-size segment (8 columns, 16
// Dilogic groups, 256-word FIFOs, 2048-word lane buffers, all defaults), from
// the Dilogic chain models through the column controllers, the lane models and
// the segment controller to the DDL port. See tb_cpv_segment_body.svh. At
// these sizes a group (at most 245 words) always fits its FIFO, so the FIFO
// stall cannot happen here; tb_cpv_segment_small covers it.
module tb_cpv_segment;
  import cpv_pkg::*;
  import tb_dil_pkg::*;
  localparam int NCOL = 8;
  localparam bit FIFO_STALL_EXPECTED = 1'b0;

  `include "tb_cpv_segment_body.svh"

  task automatic end_test;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  cpv_segment dut (
    .clk, .rst_n, .xcvr_clk(xclk), .dil_en_in_n(en_in_n), .dil_strin_n(strin_n), .dil_iobus(iobus),
    .dil_en_out(en_out), .trig, .busy, .ddl_valid(dv), .ddl_data(dd), .ddl_last(dl),
    .ddl_ready(dr), .links_up, .accepted(acc), .rejected(rej), .events_sent(sent),
    .lane_errors(lerrs), .last_busy_cycles(lbc), .fifo_stalls(stalls),
    .fill_in_frame(fills), .cmd_dropped(dropped), .lane_overruns(ovr), .columns_busy(cols_busy));
endmodule
