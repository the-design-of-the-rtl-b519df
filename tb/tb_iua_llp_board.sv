// tb_iua_llp_board -- end-to-end test of the low-level processor board at a
// reduced size (4 x 4 chips, 32 x 32 PEs) so that it builds and runs quickly.
//
// The bench (tb/board_bench_body.svh) loads an image through the backing-store
// ports, shifts it across chip boundaries, adds bit-serially, applies activity
// control, counts responders through the chips' count units and the board's
// Feedback Concentrator, reads the ICAP count registers through the same path,
// forms Coterie row busses, brings rows in from the staging memories in I/O
// mode and reads everything back. Every mechanism is counted and a mechanism
// that never ran is a failure. The board is instantiated with CHIP_ROWS and
// CHIP_COLS overridden; all per-chip sizes stay at their defaults.
module tb_iua_llp_board;

  localparam int CR = 4;
  localparam int CC = 4;

  `include "board_bench_body.svh"

  iua_llp_board #(.CHIP_ROWS(CR), .CHIP_COLS(CC)) dut (
    .clk(clk), .rst_n(rst_n), .instr(ins), .instr_valid(valid),
    .north_in(north_in), .south_in(south_in), .west_in(west_in), .east_in(east_in),
    .north_out(north_out), .south_out(south_out), .west_out(west_out), .east_out(east_out),
    .io_mode(io_mode), .stage_in(stage_in), .stage_out(stage_out),
    .icap_in(icap_in), .icr_load(icr_load), .icr_data(icr_data),
    .latch_count(latch_count), .count_sel_icap(count_sel_icap),
    .fc_reset_1(fc_reset_1), .fc_reset_2(fc_reset_2),
    .fc_serial(fc_serial), .fc_high(fc_high), .fc_all(fc_all), .fc_some(fc_some),
    .fc_one(fc_one), .board_sn(board_sn),
    .bs_start(bs_start), .bs_dir(bs_dir), .bs_byte(bs_byte), .bs_busy(bs_busy),
    .vram_out(vram_out), .vram_out_valid(vram_out_valid), .vram_in(vram_in)
  );

endmodule
