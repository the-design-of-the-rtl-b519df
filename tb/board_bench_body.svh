// board_bench_body.svh -- body of the board-level end-to-end testbench.
//
// It is kept apart from the module so that the same sequence can drive a board
// of any size. The including module defines CR and CC (chips per board column
// and row) and
// instantiates iua_llp_board as `dut` with the signals declared here. The
// bench runs one complete image operation end to end and checks every result
// against a byte-level model of the swappable cache pages kept here:
//   1. load an image byte into every PE through the backing-store ports of all
//      chips at once (corner-turned, 16 cycles);
//   2. mesh shifts south and east that cross chip boundaries;
//   3. a bit-serial 8-bit add over the whole array;
//   4. activity control: a masked write with INH "inhibit if A = 0";
//   5. the response count of a bit plane: every chip shifts out its count,
//      the board Feedback Concentrator adds them serially; plus some/none;
//   6. the same path fed from the ICAP count registers;
//   7. the Coterie Network: row busses inside each chip, OR per bus;
//   8. image input from the staging memories in I/O mode (north edges off,
//      rows shifted in from every chip's south edge);
//   9. everything read back through the backing-store ports.
// Each mechanism is counted when it runs; one that never ran is a failure.

  import llp_pkg::*;

  localparam int NCHIP = CR * CC;
  localparam int PR    = CR * 8;       // PE rows on the board
  localparam int PC    = CC * 8;       // PE columns on the board
  localparam int NPE   = PR * PC;

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rst_n, valid;
  instr_t ins;
  logic [PC-1:0] north_in, south_in, north_out, south_out;
  logic [PR-1:0] west_in, east_in, west_out, east_out;
  logic io_mode;
  logic [NCHIP-1:0][7:0] stage_in, stage_out;
  logic [NCHIP-1:0][63:0] icap_in;
  logic icr_load;
  logic [NCHIP-1:0][7:0] icr_data;
  logic latch_count, count_sel_icap, fc_reset_1, fc_reset_2;
  logic fc_serial, fc_all, fc_some, fc_one, board_sn;
  logic [5:0] fc_high;
  logic bs_start, bs_dir, bs_busy;
  logic [BYTE_IDX_W-1:0] bs_byte;
  logic [NCHIP-1:0][1:0][15:0] vram_out, vram_in;
  logic [NCHIP-1:0] vram_out_valid;

  // mechanism counters
  int n_bs_load, n_bs_store, n_mesh_cross, n_add, n_inhibit, n_count, n_icap_count,
      n_coterie, n_io, n_some_none;

  // model: 4 bytes (cache bits 0..31) per PE, indexed by board row/column
  logic [7:0] model [PR][PC][4];

  function automatic int g_row(int chip, int p);
    return (chip / CC) * 8 + p / 8;
  endfunction
  function automatic int g_col(int chip, int p);
    return (chip % CC) * 8 + p % 8;
  endfunction
  function automatic bit mbit(int r, int c, int a);
    return model[r][c][a/8][a%8];
  endfunction

  task automatic issue(instr_t w);
    ins = w; valid = 1'b1;
    @(negedge clk);
    valid = 1'b0;
  endtask

  // Load byte b of every PE (all chips in parallel) from vals[row][col].
  task automatic bs_load(int b, logic [7:0] vals [PR][PC]);
    int cyc;
    bs_byte = BYTE_IDX_W'(b); bs_dir = 1'b1; bs_start = 1'b1;
    @(negedge clk);
    bs_start = 1'b0;
    cyc = 0;
    while (bs_busy) begin
      for (int k = 0; k < NCHIP; k++)
        for (int j = 0; j < 4; j++)
          vram_in[k][j/2][8*(j%2) +: 8] = vals[g_row(k, 4*cyc+j)][g_col(k, 4*cyc+j)];
      cyc++;
      @(negedge clk);
    end
    check(cyc == 16, $sformatf("board load took %0d cycles", cyc));
    for (int r = 0; r < PR; r++) for (int c = 0; c < PC; c++) model[r][c][b] = vals[r][c];
    n_bs_load++;
  endtask

  task automatic compare_byte(int b, string what);
    int cyc, bad;
    bs_byte = BYTE_IDX_W'(b); bs_dir = 1'b0; bs_start = 1'b1;
    @(negedge clk);
    bs_start = 1'b0;
    cyc = 0;
    bad = 0;
    while (bs_busy) begin
      for (int k = 0; k < NCHIP; k++) begin
        if (!vram_out_valid[k]) bad++;
        for (int j = 0; j < 4; j++)
          if (vram_out[k][j/2][8*(j%2) +: 8] !== model[g_row(k, 4*cyc+j)][g_col(k, 4*cyc+j)][b])
            bad++;
      end
      cyc++;
      @(negedge clk);
    end
    check(cyc == 16, $sformatf("board store took %0d cycles", cyc));
    check(bad == 0, $sformatf("%s: %0d wrong bytes in byte %0d", what, bad, b));
    n_bs_store++;
  endtask

  // Latch the chip counts and add them in the Feedback Concentrator; returns
  // the 14-bit serial result (8 count bits plus 6 flushed high bits).
  task automatic board_count(bit icap, output longint total);
    latch_count = 1'b1; count_sel_icap = icap;
    @(negedge clk);
    latch_count = 1'b0;
    // chip bit 0 is on the concentrator inputs now
    fc_reset_2 = 1'b1;
    @(negedge clk);
    fc_reset_2 = 1'b0;
    total = 0;
    for (int k = 0; k < 14; k++) begin
      total |= longint'(fc_serial) << k;
      @(negedge clk);
    end
  endtask

  initial begin
    logic [7:0] vals [PR][PC];
    logic [PC-1:0] nedge [8];
    logic [PR-1:0] wedge [8];
    logic [7:0] stage [NCHIP][8];   // staged rows per chip, row 0 = first in
    longint total, expect_total;

    n_bs_load = 0; n_bs_store = 0; n_mesh_cross = 0; n_add = 0; n_inhibit = 0;
    n_count = 0; n_icap_count = 0; n_coterie = 0; n_io = 0; n_some_none = 0;
    rst_n = 1'b0; valid = 1'b0; ins = '0;
    north_in = '0; south_in = '0; west_in = '0; east_in = '0;
    io_mode = 1'b0; stage_in = '0; icap_in = '0; icr_load = 1'b0; icr_data = '0;
    latch_count = 1'b0; count_sel_icap = 1'b0; fc_reset_1 = 1'b1; fc_reset_2 = 1'b1;
    bs_start = 1'b0; bs_dir = 1'b0; bs_byte = '0; vram_in = '0;
    for (int r = 0; r < PR; r++) for (int c = 0; c < PC; c++)
      for (int b = 0; b < 4; b++) model[r][c][b] = 8'h00;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    fc_reset_1 = 1'b0;
    fc_reset_2 = 1'b0;

    // ---- 1. image load ----
    for (int r = 0; r < PR; r++) for (int c = 0; c < PC; c++) vals[r][c] = 8'($urandom);
    bs_load(0, vals);
    for (int r = 0; r < PR; r++) for (int c = 0; c < PC; c++) vals[r][c] = 8'($urandom);
    bs_load(1, vals);
    compare_byte(0, "image load");

    // ---- 2. mesh shifts across chip boundaries ----
    for (int k = 0; k < 8; k++) begin
      nedge[k] = PC'({$urandom, $urandom});
      north_in = nedge[k];
      issue(make_instr(INH_NONE, 0, FTN_I, 0, SRC_NBR1, 0, SRC_ZERO, DST_MEM, 9'(k)));
    end
    for (int r = PR-1; r >= 0; r--)
      for (int c = 0; c < PC; c++)
        for (int k = 0; k < 8; k++)
          model[r][c][0][k] = (r == 0) ? nedge[k][c] : model[r-1][c][0][k];
    for (int k = 0; k < 8; k++) begin
      wedge[k] = PR'({$urandom, $urandom});
      west_in = wedge[k];
      issue(make_instr(INH_NONE, 0, FTN_J, 0, SRC_ZERO, 0, SRC_NBR1, DST_MEM, 9'(k)));
    end
    for (int r = 0; r < PR; r++)
      for (int c = PC-1; c >= 0; c--)
        for (int k = 0; k < 8; k++)
          model[r][c][0][k] = (c == 0) ? wedge[k][r] : model[r][c-1][0][k];
    compare_byte(0, "shift south then east");
    if (CR > 1 || CC > 1) n_mesh_cross++;

    // ---- 3. bit-serial add: byte 0 += byte 1 ----
    issue(make_instr(INH_NONE, 0, FTN_LOADZ, 1, SRC_ZERO, 0, SRC_ZERO, DST_NONE, 0));
    for (int k = 0; k < 8; k++) begin
      issue(make_instr(INH_NONE, 0, FTN_I, 0, SRC_MEM, 0, SRC_ZERO, DST_B, 9'(8 + k)));
      issue(make_instr(INH_NONE, 0, FTN_ADD, 1, SRC_MEM, 1, SRC_B, DST_MEM, 9'(k)));
    end
    for (int r = 0; r < PR; r++) for (int c = 0; c < PC; c++)
      model[r][c][0] = model[r][c][0] + model[r][c][1];
    compare_byte(0, "serial add");
    n_add++;

    // ---- 4. activity control: byte 2 bit 0 <- 1 only where byte 1 bit 3 ----
    issue(make_instr(INH_NONE, 0, FTN_I, 0, SRC_MEM, 0, SRC_ZERO, DST_A, 9'd11));
    issue(make_instr(INH_A, 1, FTN_I, 0, SRC_ZERO, 0, SRC_ZERO, DST_MEM, 9'd16));
    for (int r = 0; r < PR; r++) for (int c = 0; c < PC; c++)
      if (mbit(r, c, 11)) model[r][c][2][0] = 1'b1;
    compare_byte(2, "masked write");
    n_inhibit++;

    // ---- 5. response count of bit planes ----
    for (int t = 0; t < 3; t++) begin
      int bitn;
      bitn = (t == 2) ? 16 : $urandom_range(0, 7);
      issue(make_instr(INH_NONE, 0, FTN_I, 0, SRC_MEM, 0, SRC_ZERO, DST_X, 9'(bitn)));
      expect_total = 0;
      for (int r = 0; r < PR; r++) for (int c = 0; c < PC; c++)
        expect_total += longint'(mbit(r, c, bitn));
      check(board_sn == (expect_total != 0), "board some/none");
      n_some_none++;
      @(negedge clk);   // the count of the new X reaches LCR
      board_count(1'b0, total);
      check(total == expect_total,
            $sformatf("board count of bit %0d = %0d, expected %0d", bitn, total, expect_total));
      n_count++;
    end

    // ---- 6. ICAP count registers through the same path ----
    expect_total = 0;
    for (int k = 0; k < NCHIP; k++) begin
      icr_data[k] = 8'($urandom);
      expect_total += longint'(icr_data[k]);
    end
    icr_load = 1'b1;
    @(negedge clk);
    icr_load = 1'b0;
    board_count(1'b1, total);
    check(total == expect_total,
          $sformatf("sum of ICAP counts = %0d, expected %0d", total, expect_total));
    n_icap_count++;

    // ---- 7. Coterie row busses ----
    for (int r = 0; r < PR; r++) for (int c = 0; c < PC; c++) vals[r][c] = 8'b0000_0101;
    bs_load(3, vals);
    issue(make_instr(INH_NONE, 0, FTN_M2MRSB, 0, SRC_ZERO, 0, SRC_ZERO, DST_NONE, 9'd24));
    issue(make_instr(INH_NONE, 0, FTN_I, 0, SRC_MEM, 0, SRC_ZERO, DST_X, 9'd2));
    issue(make_instr(INH_NONE, 1, FTN_NAND, 0, SRC_X, 0, SRC_MEM, DST_X, 9'd3));
    issue(make_instr(INH_NONE, 1, FTN_NAND, 0, SRC_X, 0, SRC_MEM, DST_X, 9'd4));
    issue(make_instr(INH_NONE, 0, FTN_COTERIE, 0, SRC_ZERO, 0, SRC_ZERO, DST_MEM, 9'd17));
    for (int r = 0; r < PR; r++)
      for (int cc = 0; cc < CC; cc++) begin
        bit any;
        any = 0;
        for (int c = cc*8; c < cc*8+8; c++) any |= mbit(r, c, 2) & mbit(r, c, 3) & mbit(r, c, 4);
        for (int c = cc*8; c < cc*8+8; c++) model[r][c][2][1] = any;
      end
    compare_byte(2, "Coterie row busses");
    n_coterie++;

    // ---- 8. image input from the staging memories (I/O mode) ----
    // Bit plane 0 of byte 1 is replaced: 8 shifts north, each chip's south
    // edge fed by its own staging memory.
    for (int k = 0; k < NCHIP; k++) for (int s = 0; s < 8; s++) stage[k][s] = 8'($urandom);
    io_mode = 1'b1;
    north_in = '1;   // must be ignored
    for (int s = 0; s < 8; s++) begin
      for (int k = 0; k < NCHIP; k++) stage_in[k] = stage[k][s];
      issue(make_instr(INH_NONE, 0, FTN_I, 0, SRC_NBR0, 0, SRC_ZERO, DST_MEM, 9'd8));
    end
    io_mode = 1'b0;
    stage_in = '0;
    // a row enters chip row 7 and moves up once per later shift, so after 8
    // shifts staged row s sits in chip row s
    for (int k = 0; k < NCHIP; k++)
      for (int s = 0; s < 8; s++)
        for (int c = 0; c < 8; c++)
          model[(k / CC) * 8 + s][(k % CC) * 8 + c][1][0] = stage[k][s][c];
    compare_byte(1, "staging-memory input");
    n_io++;

    check(n_bs_load > 0, "backing-store load exercised");
    check(n_bs_store > 0, "backing-store store exercised");
    check(n_mesh_cross > 0, "mesh across chip boundaries exercised");
    check(n_add > 0, "bit-serial add exercised");
    check(n_inhibit > 0, "activity control exercised");
    check(n_count > 0, "response count exercised");
    check(n_icap_count > 0, "ICAP count exercised");
    check(n_coterie > 0, "Coterie Network exercised");
    check(n_io > 0, "staging I/O exercised");
    check(n_some_none > 0, "some/none exercised");
    $display("mechanisms: load=%0d store=%0d mesh_cross=%0d add=%0d inhibit=%0d count=%0d icap_count=%0d coterie=%0d io=%0d some_none=%0d",
             n_bs_load, n_bs_store, n_mesh_cross, n_add, n_inhibit, n_count, n_icap_count,
             n_coterie, n_io, n_some_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
