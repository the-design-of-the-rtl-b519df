// iua_llp_board -- one processor board of the low-level array: 8x8 chips of
// 8x8 PEs (64x64 = 4096 PEs), the size of the prototype slice.
//
// All chips receive the same instruction. Their mesh edges are wired to each
// other, so the board is one 64x64 mesh; its outer edges are board ports and
// continue onto neighbouring boards. Each chip streams its latched response
// count bit-serially into one input of the board's Feedback Concentrator,
// which adds the 64 chip counts serially (result LSB first on fc_serial, top
// six bits on fc_high, plus all/some/exactly-one summaries). The OR of the
// chips' local some/none lines is the board some/none.
//
// Image I/O uses one staging video RAM per chip on its south edge: in I/O
// mode (io_mode) every chip's north edge is disabled and its south-edge input
// comes from its own staging RAM port (stage_in) instead of the chip below,
// so every chip loads an image row by row in parallel with all others; the
// south-edge bits of each chip are also presented on stage_out for writing
// the staging RAM. Each chip's backing-store port (vram_*) is brought out
// separately, as each chip has its own backing-store video RAM.
//
// Timing: everything is synchronous to clk; the instruction, edge inputs and
// io_mode act at the next rising edge. fc_serial follows the chips' count bits
// by one cycle.
//
// From the document: 64 chips per board as an 8x8 array, mesh across chip
// boundaries, one staging RAM per chip on the south edge with the north edge
// disabled during I/O, and the Feedback Concentrator summing the chip counts.
// This design's choices: output to the staging RAM is taken from the south
// edge of the mesh (the document sends it over the Coterie Network), the
// Coterie Network does not cross chip boundaries, and the control strobes of
// the array controller are plain ports.
module iua_llp_board
  import llp_pkg::*;
#(
  parameter int unsigned CHIP_ROWS = 8,
  parameter int unsigned CHIP_COLS = 8,
  parameter int unsigned ROWS      = 8,   // PEs per chip, vertically
  parameter int unsigned COLS      = 8,   // PEs per chip, horizontally
  parameter int unsigned FC_IN     = 64
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  instr_t                                    instr,
  input  logic                                      instr_valid,
  // board mesh edges
  input  logic [CHIP_COLS*COLS-1:0]                 north_in,
  input  logic [CHIP_COLS*COLS-1:0]                 south_in,
  input  logic [CHIP_ROWS*ROWS-1:0]                 west_in,
  input  logic [CHIP_ROWS*ROWS-1:0]                 east_in,
  output logic [CHIP_COLS*COLS-1:0]                 north_out,
  output logic [CHIP_COLS*COLS-1:0]                 south_out,
  output logic [CHIP_ROWS*ROWS-1:0]                 west_out,
  output logic [CHIP_ROWS*ROWS-1:0]                 east_out,
  // staging-memory image I/O
  input  logic                                      io_mode,
  input  logic [CHIP_ROWS*CHIP_COLS-1:0][COLS-1:0]  stage_in,
  output logic [CHIP_ROWS*CHIP_COLS-1:0][COLS-1:0]  stage_out,
  // intermediate-level inputs
  input  logic [CHIP_ROWS*CHIP_COLS-1:0][ROWS*COLS-1:0] icap_in,
  input  logic                                      icr_load,
  input  logic [CHIP_ROWS*CHIP_COLS-1:0][7:0]       icr_data,
  // response count and summaries
  input  logic                                      latch_count,
  input  logic                                      count_sel_icap,
  input  logic                                      fc_reset_1,
  input  logic                                      fc_reset_2,
  output logic                                      fc_serial,
  output logic [5:0]                                fc_high,
  output logic                                      fc_all,
  output logic                                      fc_some,
  output logic                                      fc_one,
  output logic                                      board_sn,
  // backing store, one video RAM port per chip
  input  logic                                      bs_start,
  input  logic                                      bs_dir,
  input  logic [BYTE_IDX_W-1:0]                     bs_byte,
  output logic                                      bs_busy,
  output logic [CHIP_ROWS*CHIP_COLS-1:0][1:0][15:0] vram_out,
  output logic [CHIP_ROWS*CHIP_COLS-1:0]            vram_out_valid,
  input  logic [CHIP_ROWS*CHIP_COLS-1:0][1:0][15:0] vram_in
);

  localparam int unsigned NCHIP = CHIP_ROWS * CHIP_COLS;

  initial begin
    assert (NCHIP <= FC_IN) else $error("more chips than concentrator inputs");
  end

  logic [NCHIP-1:0][COLS-1:0] c_nin, c_sin, c_nout, c_sout;
  logic [NCHIP-1:0][ROWS-1:0] c_win, c_ein, c_wout, c_eout;
  logic [NCHIP-1:0]           c_count, c_sn, c_bs_busy;
  logic [FC_IN-1:0]           fc_in;

  for (genvar i = 0; i < CHIP_ROWS; i++) begin : g_crow
    for (genvar j = 0; j < CHIP_COLS; j++) begin : g_ccol
      localparam int unsigned K = i * CHIP_COLS + j;

      if (i == 0) begin : g_nedge
        assign c_nin[K] = north_in[j*COLS +: COLS];
      end else begin : g_nlink
        assign c_nin[K] = c_sout[K - CHIP_COLS];
      end
      if (i == CHIP_ROWS - 1) begin : g_sedge
        assign c_sin[K] = io_mode ? stage_in[K] : south_in[j*COLS +: COLS];
      end else begin : g_slink
        assign c_sin[K] = io_mode ? stage_in[K] : c_nout[K + CHIP_COLS];
      end
      if (j == 0) begin : g_wedge
        assign c_win[K] = west_in[i*ROWS +: ROWS];
      end else begin : g_wlink
        assign c_win[K] = c_eout[K - 1];
      end
      if (j == CHIP_COLS - 1) begin : g_eedge
        assign c_ein[K] = east_in[i*ROWS +: ROWS];
      end else begin : g_elink
        assign c_ein[K] = c_wout[K + 1];
      end

      caapp_chip #(.ROWS(ROWS), .COLS(COLS)) u_chip (
        .clk           (clk),
        .rst_n         (rst_n),
        .instr         (instr),
        .instr_valid   (instr_valid),
        .north_in      (c_nin[K]),
        .south_in      (c_sin[K]),
        .west_in       (c_win[K]),
        .east_in       (c_ein[K]),
        .north_out     (c_nout[K]),
        .south_out     (c_sout[K]),
        .west_out      (c_wout[K]),
        .east_out      (c_eout[K]),
        .io_north_off  (io_mode),
        .icap_in       (icap_in[K]),
        .latch_count   (latch_count),
        .count_sel_icap(count_sel_icap),
        .icr_load      (icr_load),
        .icr_data      (icr_data[K]),
        .l_count       (c_count[K]),
        .l_sn          (c_sn[K]),
        .count_busy    (),
        .bs_start      (bs_start),
        .bs_dir        (bs_dir),
        .bs_byte       (bs_byte),
        .bs_busy       (c_bs_busy[K]),
        .bs_done       (),
        .vram_out      (vram_out[K]),
        .vram_out_valid(vram_out_valid[K]),
        .vram_in       (vram_in[K]),
        .vram_in_ready ()
      );

      assign stage_out[K] = c_sout[K];
    end
  end

  for (genvar j = 0; j < CHIP_COLS; j++) begin : g_ns_edge
    assign north_out[j*COLS +: COLS] = c_nout[j];
    assign south_out[j*COLS +: COLS] = c_sout[(CHIP_ROWS - 1) * CHIP_COLS + j];
  end
  for (genvar i = 0; i < CHIP_ROWS; i++) begin : g_we_edge
    assign west_out[i*ROWS +: ROWS] = c_wout[i * CHIP_COLS];
    assign east_out[i*ROWS +: ROWS] = c_eout[i * CHIP_COLS + CHIP_COLS - 1];
  end

  assign fc_in    = FC_IN'(c_count);
  assign board_sn = |c_sn;
  assign bs_busy  = c_bs_busy[0];

  feedback_concentrator #(.N_IN(FC_IN), .SUM_W(7), .HIGH_W(6)) u_fc (
    .clk       (clk),
    .reset_1   (fc_reset_1),
    .reset_2   (fc_reset_2),
    .in_bits   (fc_in),
    .serial_out(fc_serial),
    .high_out  (fc_high),
    .and_out   (fc_all),
    .or_out    (fc_some),
    .one_out   (fc_one)
  );

endmodule
