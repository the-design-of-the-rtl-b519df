// tb_llp_pe -- self-checking test of one low-level processing element.
//
// Part 1 is a directed program: two 8-bit numbers are written into the cache
// through the byte port, added bit-serially (carry initialised with "I -> Z",
// eight add steps), and the sum is read back through the byte port; an 8-bit
// equality test against a broadcast value then sets A and X together, and
// the inhibit modes are exercised. Part 2 runs random instructions with random
// neighbour, Coterie and intermediate-level inputs against a reference model
// kept in the testbench, comparing A, X, MR, SB, the memory bit and a byte of
// the cache every cycle.
module tb_llp_pe;
  import llp_pkg::*;

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

  logic rst_n, valid, nn, ns, ne, nw, cot, icap;
  instr_t ins;
  logic mem_bit, a_out, x_out;
  logic [3:0] mr_out, sb_out;
  logic [BYTE_IDX_W-1:0] bs_idx;
  logic bs_we;
  logic [7:0] bs_wdata, bs_rdata;

  llp_pe dut (
    .clk(clk), .rst_n(rst_n), .instr(ins), .instr_valid(valid),
    .nbr_n(nn), .nbr_s(ns), .nbr_e(ne), .nbr_w(nw), .coterie_in(cot), .icap_in(icap),
    .mem_bit(mem_bit), .a_out(a_out), .x_out(x_out), .mr_out(mr_out), .sb_out(sb_out),
    .bs_idx(bs_idx), .bs_we(bs_we), .bs_wdata(bs_wdata), .bs_rdata(bs_rdata)
  );

  // ---------------- reference model ----------------
  bit m_a, m_b, m_x, m_y, m_cy;   // m_cy is the true carry
  bit [3:0] m_mr, m_sb;
  bit m_mem [512];

  function automatic bit m_src(bit is_j, logic [3:0] code);
    case (code)
      0: return 0;
      1: return !m_cy;               // the carry register reads as inverted carry
      2: return is_j ? ne : ns;
      3: return is_j ? nw : nn;
      4: return m_y;
      5: return m_x;
      6: return m_b;
      7: return m_a;
      8: return (ins.addr < 320) ? m_mem[ins.addr] : 0;
      default: return 0;
    endcase
  endfunction

  task automatic m_step();
    bit i, j, r, d, act;
    int base;
    i = ins.c_i ^ m_src(0, ins.s_i);
    j = ins.c_j ^ m_src(1, ins.s_j);
    case (ins.inh)
      INH_NONE:   act = 1;
      INH_A:      act = m_a;
      INH_A_SOME: act = m_a && !cot;
      default:    act = m_a && cot;
    endcase
    if (!valid || !act) return;
    base = (ins.addr / 8) * 8;
    if (ins.ftn <= 7) begin
      int s;
      case (ins.ftn)
        0: r = cot;
        1: r = i;
        2: r = j;
        3: r = !(i && j);
        4: r = !(i || j);
        5: r = (i == j);
        6: begin
             // ~I + ~J + ~Z: with Z the inverted carry, ~Z is the true carry
             s = int'(!i) + int'(!j) + int'(m_cy);
             r = s[0];
             m_cy = s[1];
           end
        default: r = icap;
      endcase
      d = ins.c_r ^ r;
      case (ins.dest)
        1: begin m_a = d; m_x = d; end
        2: begin m_a = d; m_x = i; end
        3: begin m_a = d; m_x = j; end
        4: m_y = d;
        5: m_x = d;
        6: m_b = d;
        7: m_a = d;
        8: if (ins.addr < 320) m_mem[ins.addr] = d;
        default: ;
      endcase
    end else begin
      case (ins.ftn)
        8: m_cy = !i;
        9: if (ins.addr < 256) for (int k = 0; k < 4; k++) m_mr[k] = m_mem[base+k];
           else m_mr = 0;
        10: if (ins.addr < 256) for (int k = 0; k < 4; k++) begin
              m_mr[k] = m_mem[base+k]; m_sb[k] = m_mem[base+4+k];
            end else begin m_mr = 0; m_sb = 0; end
        11: if (ins.addr < 256) for (int k = 0; k < 4; k++) m_mem[base+k] = m_mr[k];
        12: if (ins.addr < 256) for (int k = 0; k < 4; k++) begin
              m_mem[base+k] = m_mr[k]; m_mem[base+4+k] = m_sb[k];
            end
        default: ;
      endcase
    end
  endtask

  // Issue one instruction (model updated at the same clock edge).
  task automatic issue(instr_t w);
    ins = w;
    valid = 1'b1;
    @(posedge clk);
    m_step();
    @(negedge clk);
    valid = 1'b0;
  endtask

  task automatic write_byte(int idx, logic [7:0] v);
    bs_idx = BYTE_IDX_W'(idx); bs_wdata = v; bs_we = 1'b1;
    @(posedge clk);
    for (int k = 0; k < 8; k++) m_mem[idx*8+k] = v[k];
    @(negedge clk);
    bs_we = 1'b0;
  endtask

  task automatic compare(string where);
    logic [7:0] mb;
    for (int k = 0; k < 8; k++) mb[k] = m_mem[int'(bs_idx)*8+k];
    check(a_out == m_a && x_out == m_x, $sformatf("%s: A/X %b%b expected %b%b",
          where, a_out, x_out, m_a, m_x));
    check(mr_out == m_mr && sb_out == m_sb, $sformatf("%s: MR/SB", where));
    check(bs_rdata == mb, $sformatf("%s: byte %0d = %02h expected %02h",
          where, bs_idx, bs_rdata, mb));
    check(mem_bit == ((ins.addr < 320) ? m_mem[ins.addr] : 1'b0),
          $sformatf("%s: memory bit at %0d", where, ins.addr));
  endtask

  initial begin
    logic [7:0] va, vb, got;
    rst_n = 1'b0; valid = 1'b0; ins = '0;
    nn = 0; ns = 0; ne = 0; nw = 0; cot = 0; icap = 0;
    bs_idx = '0; bs_we = 1'b0; bs_wdata = '0;
    m_a = 0; m_b = 0; m_x = 0; m_y = 0; m_cy = 0; m_mr = 0; m_sb = 0;
    for (int k = 0; k < 512; k++) m_mem[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- part 1a: bit-serial 8-bit add, field 0..7 += field 8..15 ----
    for (int t = 0; t < 4; t++) begin
      va = 8'($urandom); vb = 8'($urandom);
      if (t == 0) begin va = 8'hff; vb = 8'h01; end
      write_byte(0, va);
      write_byte(1, vb);
      // carry clear: Z <- I with I = ~ZERO = 1
      issue(make_instr(INH_NONE, 0, FTN_LOADZ, 1, SRC_ZERO, 0, SRC_ZERO, DST_NONE, 0));
      for (int k = 0; k < 8; k++) begin
        // B <- bit k of field 1; then mem[k] <- mem[k] + B + carry, with
        // I = ~mem[k] and J = ~B complemented back by the adder
        issue(make_instr(INH_NONE, 0, FTN_I, 0, SRC_MEM, 0, SRC_ZERO, DST_B, 9'(8 + k)));
        issue(make_instr(INH_NONE, 0, FTN_ADD, 1, SRC_MEM, 1, SRC_B, DST_MEM, 9'(k)));
      end
      bs_idx = 0;
      #1 got = bs_rdata;
      check(got == 8'(va + vb), $sformatf("serial add %02h + %02h = %02h", va, vb, got));
      compare("after add");
    end

    // ---- part 1b: equality test of field 0 with a broadcast value ----
    // A and X both get the result: X <- ~(mem ^ b) accumulated with AND.
    for (int t = 0; t < 4; t++) begin
      logic [7:0] key;
      va = 8'($urandom);
      key = (t % 2 == 0) ? va : va ^ 8'(1 << (t + 2));
      write_byte(0, va);
      // A, X <- 1
      issue(make_instr(INH_NONE, 1, FTN_I, 0, SRC_ZERO, 0, SRC_ZERO, DST_AX, 0));
      for (int k = 0; k < 8; k++)
        // with A active only: A,X <- mem[k] xnor key[k]  (C_j complements J=ZERO)
        issue(make_instr(INH_A, 0, FTN_XNOR, 0, SRC_MEM, key[k], SRC_ZERO, DST_AX, 9'(k)));
      check(x_out == (key == va) && a_out == (key == va),
            $sformatf("equality %02h == %02h gives A=%b X=%b", va, key, a_out, x_out));
    end

    // ---- part 1c: inhibit by Coterie some/none ----
    issue(make_instr(INH_NONE, 1, FTN_I, 0, SRC_ZERO, 0, SRC_ZERO, DST_A, 0));     // A <- 1
    cot = 1;
    issue(make_instr(INH_A_SOME, 1, FTN_I, 0, SRC_ZERO, 0, SRC_ZERO, DST_X, 0));   // inhibited
    check(x_out == m_x, "inhibit when some");
    issue(make_instr(INH_A_NONE, 0, FTN_COTERIE, 0, SRC_ZERO, 0, SRC_ZERO, DST_Y, 0));
    issue(make_instr(INH_NONE, 0, FTN_I, 0, SRC_Y, 0, SRC_ZERO, DST_X, 0));
    check(x_out == 1'b1, "Coterie value read into Y then X");
    cot = 0;

    // ---- part 2: random instructions against the model ----
    for (int n = 0; n < 3000; n++) begin
      instr_t w;
      w = instr_t'($urandom);
      w.zero_hi = 1'b0;
      w.zero_lo = 1'b0;
      w.ftn  = ftn_e'($urandom_range(0, 15));
      w.s_i  = src_e'($urandom_range(0, 9));
      w.s_j  = src_e'($urandom_range(0, 9));
      w.dest = dest_e'($urandom_range(0, 9));
      w.addr = ($urandom_range(0, 3) == 0) ? 9'($urandom_range(0, 511)) : 9'($urandom_range(0, 31));
      if ($urandom_range(0, 2) == 0) w.inh = INH_NONE;
      nn = 1'($urandom); ns = 1'($urandom); ne = 1'($urandom); nw = 1'($urandom);
      cot = 1'($urandom); icap = 1'($urandom);
      bs_idx = BYTE_IDX_W'($urandom_range(0, 3));
      issue(w);
      compare($sformatf("random step %0d", n));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
