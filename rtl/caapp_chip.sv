// caapp_chip -- one low-level processor chip: an 8x8 mesh of bit-serial PEs.
//
// All PEs execute the broadcast instruction in lock step, one instruction per
// cycle. Around the PE array the chip holds:
//   * the nearest-neighbour mesh: each PE reads the memory bit of its N/S
//     neighbour as source I and of its E/W neighbour as source J; the bits of
//     the edge PEs leave the chip and neighbouring chips' bits come in, so the
//     mesh continues across chip boundaries at full width;
//   * the Coterie Network (llp_coterie), which joins PEs into groups under the
//     control of each PE's MR/SB switch registers and returns the wired-OR of
//     each group's X registers to its members;
//   * the response-count unit (llp_count_unit): count of X registers, local
//     some/none, and serial output of the latched count;
//   * the backing-store controller (llp_backing_store_ctrl), which corner-
//     turns bytes of the swappable cache pages to and from the video RAM port.
// For image I/O, io_north_off disables the north edge of the mesh (inputs
// read as 0, outputs driven 0), so that data shifted in from the south edge
// stays within the chip.
//
// Timing: the instruction and the neighbour bits are combinational inputs to
// the PEs and take effect at the rising clock edge. Edge outputs are the edge
// PEs' memory bits at the current instruction's address.
//
// From the document: the 64-PE chip as an 8x8 array, full mesh across chip
// boundaries, the Coterie Network, the response count with serial output, the
// backing-store path and the north-edge disable for I/O. This design's
// choices: the Coterie Network stays inside the chip (the arms on the chip
// boundary lead nowhere), the control strobes for counting, I/O and backing
// store transfers are separate inputs rather than instruction encodings, and
// icap_in gives each PE the bit that function 7 reads from the intermediate
// level.
module caapp_chip
  import llp_pkg::*;
#(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  instr_t                       instr,
  input  logic                         instr_valid,
  // mesh edges
  input  logic [COLS-1:0]              north_in,
  input  logic [COLS-1:0]              south_in,
  input  logic [ROWS-1:0]              west_in,
  input  logic [ROWS-1:0]              east_in,
  output logic [COLS-1:0]              north_out,
  output logic [COLS-1:0]              south_out,
  output logic [ROWS-1:0]              west_out,
  output logic [ROWS-1:0]              east_out,
  input  logic                         io_north_off,
  // intermediate-level bits for function 7
  input  logic [ROWS*COLS-1:0]         icap_in,
  // response count
  input  logic                         latch_count,
  input  logic                         count_sel_icap,
  input  logic                         icr_load,
  input  logic [7:0]                   icr_data,
  output logic                         l_count,
  output logic                         l_sn,
  output logic                         count_busy,
  // backing store
  input  logic                         bs_start,
  input  logic                         bs_dir,
  input  logic [BYTE_IDX_W-1:0]        bs_byte,
  output logic                         bs_busy,
  output logic                         bs_done,
  output logic [1:0][15:0]             vram_out,
  output logic                         vram_out_valid,
  input  logic [1:0][15:0]             vram_in,
  output logic                         vram_in_ready
);

  localparam int unsigned N = ROWS * COLS;

  logic [N-1:0]      mbit, xv, grp;
  logic [N-1:0][3:0] mr, sb;
  logic [N-1:0]      pe_we;
  logic [N-1:0][7:0] pe_wdata, pe_rdata;
  logic [BYTE_IDX_W-1:0] pe_idx;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned P = r * COLS + c;
      logic nn, ns, ne, nw;
      if (r == 0) begin : g_nedge
        assign nn = north_in[c] & ~io_north_off;
      end else begin : g_nlink
        assign nn = mbit[P - COLS];
      end
      if (r == ROWS - 1) begin : g_sedge
        assign ns = south_in[c];
      end else begin : g_slink
        assign ns = mbit[P + COLS];
      end
      if (c == 0) begin : g_wedge
        assign nw = west_in[r];
      end else begin : g_wlink
        assign nw = mbit[P - 1];
      end
      if (c == COLS - 1) begin : g_eedge
        assign ne = east_in[r];
      end else begin : g_elink
        assign ne = mbit[P + 1];
      end

      llp_pe u_pe (
        .clk        (clk),
        .rst_n      (rst_n),
        .instr      (instr),
        .instr_valid(instr_valid),
        .nbr_n      (nn),
        .nbr_s      (ns),
        .nbr_e      (ne),
        .nbr_w      (nw),
        .coterie_in (grp[P]),
        .icap_in    (icap_in[P]),
        .mem_bit    (mbit[P]),
        .a_out      (),
        .x_out      (xv[P]),
        .mr_out     (mr[P]),
        .sb_out     (sb[P]),
        .bs_idx     (pe_idx),
        .bs_we      (pe_we[P]),
        .bs_wdata   (pe_wdata[P]),
        .bs_rdata   (pe_rdata[P])
      );
    end
  end

  for (genvar c = 0; c < COLS; c++) begin : g_ns_edge
    assign north_out[c] = mbit[c] & ~io_north_off;
    assign south_out[c] = mbit[(ROWS - 1) * COLS + c];
  end
  for (genvar r = 0; r < ROWS; r++) begin : g_we_edge
    assign west_out[r] = mbit[r * COLS];
    assign east_out[r] = mbit[r * COLS + COLS - 1];
  end

  llp_coterie #(.ROWS(ROWS), .COLS(COLS)) u_coterie (
    .x  (xv),
    .mr (mr),
    .sb (sb),
    .grp(grp)
  );

  llp_count_unit #(.N_PE(N), .CR_W(8)) u_count (
    .clk     (clk),
    .rst_n   (rst_n),
    .x       (xv),
    .latch   (latch_count),
    .sel_icap(count_sel_icap),
    .icr_load(icr_load),
    .icr_data(icr_data),
    .l_count (l_count),
    .l_sn    (l_sn),
    .busy    (count_busy)
  );

  llp_backing_store_ctrl #(.N_PE(N)) u_bs (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (bs_start),
    .dir           (bs_dir),
    .byte_idx      (bs_byte),
    .busy          (bs_busy),
    .done          (bs_done),
    .pe_idx        (pe_idx),
    .pe_we         (pe_we),
    .pe_wdata      (pe_wdata),
    .pe_rdata      (pe_rdata),
    .vram_out      (vram_out),
    .vram_out_valid(vram_out_valid),
    .vram_in       (vram_in),
    .vram_in_ready (vram_in_ready)
  );

endmodule
