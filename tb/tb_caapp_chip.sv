// tb_caapp_chip -- self-checking test of one 64-PE low-level processor chip.
//
// Data enters and leaves the chip only the way the hardware moves it: images
// are loaded into the caches and read back through the backing-store port
// (corner-turned bytes). Between, the testbench runs instruction sequences
// and checks the results against a byte-level model kept in the testbench:
//   * mesh shifts south and west, with data entering from the chip edges;
//   * the north edge disabled for I/O (row 0 then reads 0 from the north);
//   * the response count: X loaded from a cache bit, count latched, 8 serial
//     bits LSB first, and the local some/none line;
//   * the Coterie Network: switch registers loaded from a cache byte in one
//     instruction, then a row-bus and a column-bus OR read back into memory;
//   * the intermediate-level bit read by function 7.
module tb_caapp_chip;
  import llp_pkg::*;

  localparam int R = 8;
  localparam int C = 8;
  localparam int N = R * C;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst_n, valid;
  instr_t ins;
  logic [C-1:0] north_in, south_in, north_out, south_out;
  logic [R-1:0] west_in, east_in, west_out, east_out;
  logic io_north_off;
  logic [N-1:0] icap_in;
  logic latch_count, count_sel_icap, icr_load, l_count, l_sn, count_busy;
  logic [7:0] icr_data;
  logic bs_start, bs_dir, bs_busy, bs_done, vram_out_valid, vram_in_ready;
  logic [BYTE_IDX_W-1:0] bs_byte;
  logic [1:0][15:0] vram_out, vram_in;

  caapp_chip #(.ROWS(R), .COLS(C)) dut (
    .clk(clk), .rst_n(rst_n), .instr(ins), .instr_valid(valid),
    .north_in(north_in), .south_in(south_in), .west_in(west_in), .east_in(east_in),
    .north_out(north_out), .south_out(south_out), .west_out(west_out), .east_out(east_out),
    .io_north_off(io_north_off), .icap_in(icap_in),
    .latch_count(latch_count), .count_sel_icap(count_sel_icap), .icr_load(icr_load),
    .icr_data(icr_data), .l_count(l_count), .l_sn(l_sn), .count_busy(count_busy),
    .bs_start(bs_start), .bs_dir(bs_dir), .bs_byte(bs_byte), .bs_busy(bs_busy),
    .bs_done(bs_done), .vram_out(vram_out), .vram_out_valid(vram_out_valid),
    .vram_in(vram_in), .vram_in_ready(vram_in_ready)
  );

  logic [7:0] model [N][32];   // expected swappable-page bytes
  logic [7:0] got [N];

  function automatic bit mbit(int p, int a);
    return model[p][a/8][a%8];
  endfunction

  task automatic issue(instr_t w);
    ins = w; valid = 1'b1;
    @(negedge clk);
    valid = 1'b0;
  endtask

  // Load byte b of every PE from `vals` through the backing-store port.
  task automatic bs_load(int b, logic [7:0] vals [N]);
    int cyc;
    bs_byte = BYTE_IDX_W'(b); bs_dir = 1'b1; bs_start = 1'b1;
    @(negedge clk);
    bs_start = 1'b0;
    cyc = 0;
    while (bs_busy) begin
      vram_in[0] = {vals[4*cyc+1], vals[4*cyc]};
      vram_in[1] = {vals[4*cyc+3], vals[4*cyc+2]};
      cyc++;
      @(negedge clk);
    end
    check(cyc == 16, $sformatf("backing-store load took %0d cycles", cyc));
    for (int p = 0; p < N; p++) model[p][b] = vals[p];
  endtask

  // Read byte b of every PE into `got` through the backing-store port.
  task automatic bs_store(int b);
    int cyc;
    bs_byte = BYTE_IDX_W'(b); bs_dir = 1'b0; bs_start = 1'b1;
    @(negedge clk);
    bs_start = 1'b0;
    cyc = 0;
    while (bs_busy) begin
      got[4*cyc]   = vram_out[0][7:0];
      got[4*cyc+1] = vram_out[0][15:8];
      got[4*cyc+2] = vram_out[1][7:0];
      got[4*cyc+3] = vram_out[1][15:8];
      cyc++;
      @(negedge clk);
    end
    check(cyc == 16, $sformatf("backing-store store took %0d cycles", cyc));
  endtask

  task automatic compare_byte(int b, string what);
    int bad;
    bs_store(b);
    bad = 0;
    for (int p = 0; p < N; p++) if (got[p] !== model[p][b]) bad++;
    check(bad == 0, $sformatf("%s: %0d PEs hold a wrong byte %0d", what, bad, b));
  endtask

  initial begin
    logic [7:0] vals [N];
    logic [7:0] nb [N];
    logic [C-1:0] edge_bits [8];
    logic [R-1:0] wedge [8];
    int expect_n, cnt;

    rst_n = 1'b0; valid = 1'b0; ins = '0;
    north_in = '0; south_in = '0; west_in = '0; east_in = '0; io_north_off = 1'b0;
    icap_in = '0; latch_count = 1'b0; count_sel_icap = 1'b0; icr_load = 1'b0; icr_data = '0;
    bs_start = 1'b0; bs_dir = 1'b0; bs_byte = '0; vram_in = '0;
    for (int p = 0; p < N; p++) for (int b = 0; b < 32; b++) model[p][b] = 8'h00;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- load an image byte into byte 0, read it back ----
    for (int p = 0; p < N; p++) vals[p] = 8'($urandom);
    bs_load(0, vals);
    compare_byte(0, "load/store round trip");

    // ---- shift south by one PE: mem[k] <- North neighbour's mem[k] ----
    for (int k = 0; k < 8; k++) begin
      edge_bits[k] = C'($urandom);
      north_in = edge_bits[k];
      issue(make_instr(INH_NONE, 0, FTN_I, 0, SRC_NBR1, 0, SRC_ZERO, DST_MEM, 9'(k)));
    end
    for (int r = R-1; r >= 0; r--)
      for (int c = 0; c < C; c++)
        for (int k = 0; k < 8; k++)
          model[r*C+c][0][k] = (r == 0) ? edge_bits[k][c] : model[(r-1)*C+c][0][k];
    compare_byte(0, "shift south");

    // ---- shift west by one PE: mem[k] <- East neighbour's mem[k] (J) ----
    for (int k = 0; k < 8; k++) begin
      wedge[k] = R'($urandom);
      east_in = wedge[k];
      issue(make_instr(INH_NONE, 0, FTN_J, 0, SRC_ZERO, 0, SRC_NBR0, DST_MEM, 9'(k)));
    end
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        for (int k = 0; k < 8; k++)
          model[r*C+c][0][k] = (c == C-1) ? wedge[k][r] : model[r*C+c+1][0][k];
    compare_byte(0, "shift west");

    // ---- edge outputs show the edge PEs' memory bits ----
    ins = make_instr(INH_NONE, 0, FTN_I, 0, SRC_ZERO, 0, SRC_ZERO, DST_NONE, 9'd3);
    #1;
    for (int c = 0; c < C; c++) begin
      check(north_out[c] == mbit(c, 3), "north edge output");
      check(south_out[c] == mbit((R-1)*C+c, 3), "south edge output");
    end

    // ---- I/O: north edge disabled, shift south with ones on north_in ----
    io_north_off = 1'b1;
    north_in = '1;
    issue(make_instr(INH_NONE, 0, FTN_I, 0, SRC_NBR1, 0, SRC_ZERO, DST_MEM, 9'd0));
    for (int r = R-1; r >= 0; r--)
      for (int c = 0; c < C; c++)
        model[r*C+c][0][0] = (r == 0) ? 1'b0 : model[(r-1)*C+c][0][0];
    check(north_out == '0, "north edge outputs off in I/O mode");
    io_north_off = 1'b0;
    compare_byte(0, "north edge disabled");

    // ---- response count of bit 5 of byte 0 ----
    for (int t = 0; t < 3; t++) begin
      int bitn;
      bitn = (t == 0) ? 5 : $urandom_range(0, 7);
      issue(make_instr(INH_NONE, 0, FTN_I, 0, SRC_MEM, 0, SRC_ZERO, DST_X, 9'(bitn)));
      expect_n = 0;
      for (int p = 0; p < N; p++) expect_n += int'(mbit(p, bitn));
      check(l_sn == (expect_n != 0), "local some/none");
      @(negedge clk);   // LCR holds the count one cycle after X is written
      latch_count = 1'b1;
      @(negedge clk);
      latch_count = 1'b0;
      cnt = 0;
      for (int k = 0; k < 8; k++) begin
        cnt |= int'(l_count) << k;
        @(negedge clk);
      end
      check(cnt == expect_n, $sformatf("response count %0d, expected %0d", cnt, expect_n));
    end
    // no responders
    issue(make_instr(INH_NONE, 0, FTN_I, 0, SRC_ZERO, 0, SRC_ZERO, DST_X, 9'd0));
    check(l_sn == 1'b0, "some/none with no responders");

    // ---- Coterie: row busses (MR = W,E joined), X from bit 1 of byte 0 ----
    for (int p = 0; p < N; p++) nb[p] = 8'b0000_0101;   // SB=0000 MR=0101
    bs_load(1, nb);
    issue(make_instr(INH_NONE, 0, FTN_M2MRSB, 0, SRC_ZERO, 0, SRC_ZERO, DST_NONE, 9'd8));
    for (int t = 0; t < 2; t++) begin
      int src_bit;
      src_bit = 1 + t;
      issue(make_instr(INH_NONE, 0, FTN_I, 0, SRC_MEM, 0, SRC_ZERO, DST_X, 9'(src_bit)));
      // thin the responders: X <- X and bit 7
      issue(make_instr(INH_NONE, 1, FTN_NAND, 0, SRC_X, 0, SRC_MEM, DST_X, 9'd7));
      issue(make_instr(INH_NONE, 0, FTN_COTERIE, 0, SRC_ZERO, 0, SRC_ZERO, DST_MEM, 9'(16 + t)));
      for (int r = 0; r < R; r++) begin
        bit any;
        any = 0;
        for (int c = 0; c < C; c++) any |= mbit(r*C+c, src_bit) & mbit(r*C+c, 7);
        for (int c = 0; c < C; c++) model[r*C+c][2][t] = any;
      end
    end
    compare_byte(2, "Coterie row busses");

    // column busses set from memory with MR,SB -> memory round trip
    for (int p = 0; p < N; p++) nb[p] = 8'b0000_1010;   // MR = N,S joined
    bs_load(1, nb);
    issue(make_instr(INH_NONE, 0, FTN_M2MR, 0, SRC_ZERO, 0, SRC_ZERO, DST_NONE, 9'd8));
    issue(make_instr(INH_NONE, 0, FTN_MRSB2M, 0, SRC_ZERO, 0, SRC_ZERO, DST_NONE, 9'd24));
    for (int p = 0; p < N; p++) model[p][3] = 8'b0000_1010;
    issue(make_instr(INH_NONE, 0, FTN_I, 0, SRC_MEM, 0, SRC_ZERO, DST_X, 9'd4));
    issue(make_instr(INH_NONE, 0, FTN_COTERIE, 0, SRC_ZERO, 0, SRC_ZERO, DST_MEM, 9'd18));
    for (int c = 0; c < C; c++) begin
      bit any;
      any = 0;
      for (int r = 0; r < R; r++) any |= mbit(r*C+c, 4);
      for (int r = 0; r < R; r++) model[r*C+c][2][2] = any;
    end
    compare_byte(2, "Coterie column busses");
    compare_byte(3, "MR,SB stored to memory");

    // ---- intermediate-level bits ----
    icap_in = {$urandom, $urandom};
    issue(make_instr(INH_NONE, 0, FTN_ICAP, 0, SRC_ZERO, 0, SRC_ZERO, DST_MEM, 9'd19));
    for (int p = 0; p < N; p++) model[p][2][3] = icap_in[p];
    compare_byte(2, "intermediate-level bits");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
