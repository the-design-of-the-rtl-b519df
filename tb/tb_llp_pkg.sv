// tb_llp_pkg -- self-checking test of the shared instruction definitions.
//
// Checks that the instruction word is 32 bits, that make_instr() places every
// field at the bit positions of the published instruction format (INH at
// 30:29, C_r at 28, Ftn at 27:24, C_i at 23, S_i at 22:19, C_j at 18, S_j at
// 17:14, Dest at 13:10, Address at 8:0, bits 31 and 9 zero), and that the
// enumeration codes match the instruction-set table. Expected words are built
// here with shifts, independently of the packed struct.
module tb_llp_pkg;
  import llp_pkg::*;

  int checks = 0;
  int failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_t w;
    logic [31:0] expect_w;

    check($bits(instr_t) == 32, "instruction word is 32 bits");
    check(CACHE_BITS == 320 && PAGE_BITS == 128 && ADDR_W == 9, "cache sizes");

    // table codes
    check(SRC_ZERO == 0 && SRC_C == 1 && SRC_NBR0 == 2 && SRC_NBR1 == 3 && SRC_Y == 4 &&
          SRC_X == 5 && SRC_B == 6 && SRC_A == 7 && SRC_MEM == 8, "source codes");
    check(FTN_COTERIE == 0 && FTN_I == 1 && FTN_J == 2 && FTN_NAND == 3 && FTN_NOR == 4 &&
          FTN_XNOR == 5 && FTN_ADD == 6 && FTN_ICAP == 7 && FTN_LOADZ == 8 &&
          FTN_M2MR == 9 && FTN_M2MRSB == 10 && FTN_MR2M == 11 && FTN_MRSB2M == 12,
          "function codes");
    check(DST_NONE == 0 && DST_AX == 1 && DST_AX_I == 2 && DST_AX_J == 3 && DST_Y == 4 &&
          DST_X == 5 && DST_B == 6 && DST_A == 7 && DST_MEM == 8, "destination codes");
    check(INH_NONE == 0 && INH_A == 1 && INH_A_SOME == 2 && INH_A_NONE == 3, "inhibit codes");

    // one field at a time, then random words
    for (int t = 0; t < 500; t++) begin
      logic [1:0] inh;
      logic cr, ci, cj;
      logic [3:0] ftn, si, sj, dst;
      logic [8:0] addr;
      inh = 2'($urandom); cr = 1'($urandom); ci = 1'($urandom); cj = 1'($urandom);
      ftn = 4'($urandom_range(0, 12)); si = 4'($urandom_range(0, 8));
      sj = 4'($urandom_range(0, 8)); dst = 4'($urandom_range(0, 8));
      addr = 9'($urandom);
      if (t < 9) begin
        // walk a single non-zero field
        {inh, cr, ci, cj, ftn, si, sj, dst, addr} = '0;
        case (t)
          0: inh = 2'd3;   1: cr = 1'b1;    2: ftn = 4'd12;  3: ci = 1'b1;
          4: si = 4'd8;    5: cj = 1'b1;    6: sj = 4'd8;    7: dst = 4'd8;
          default: addr = 9'h1ff;
        endcase
      end
      expect_w = (32'(inh) << 29) | (32'(cr) << 28) | (32'(ftn) << 24) | (32'(ci) << 23) |
                 (32'(si) << 19) | (32'(cj) << 18) | (32'(sj) << 14) | (32'(dst) << 10) |
                 32'(addr);
      w = make_instr(inh_e'(inh), cr, ftn_e'(ftn), ci, src_e'(si), cj, src_e'(sj),
                     dest_e'(dst), addr);
      check(32'(w) == expect_w, $sformatf("make_instr word %08h, expected %08h", 32'(w), expect_w));
      check(w.inh == inh && w.c_r == cr && w.ftn == ftn && w.c_i == ci && w.s_i == si &&
            w.c_j == cj && w.s_j == sj && w.dest == dst && w.addr == addr,
            "fields read back from the struct");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
