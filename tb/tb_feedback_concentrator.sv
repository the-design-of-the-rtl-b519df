// tb_feedback_concentrator -- self-checking test of the Feedback Concentrator.
//
// Part 1 drives one concentrator with 64 random 8-bit numbers, LSB first, then
// six zero cycles, and checks that the serial output (one cycle behind the
// inputs) plus the parallel high bits give the exact sum, both right after the
// last input bits and after the flush. Part 2 checks the all/some/exactly-one
// summaries. Part 3 cascades 64 first-level concentrators into one second-level
// concentrator (4096 chip counts, 262,144 PEs) and checks the total and that
// the last serial result bit leaves 16 cycles after the chip counts start.
// Expected values are computed in the testbench with integer arithmetic.
module tb_feedback_concentrator;

  localparam int N = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- single concentrator ----------------
  logic          r1, r2;
  logic [N-1:0]  in_bits;
  logic          s_out, a_out, o_out, one_out;
  logic [5:0]    h_out;

  feedback_concentrator dut (
    .clk(clk), .reset_1(r1), .reset_2(r2), .in_bits(in_bits),
    .serial_out(s_out), .high_out(h_out),
    .and_out(a_out), .or_out(o_out), .one_out(one_out)
  );

  // ---------------- two-level cascade ----------------
  logic           c_r1, c_r2_l1, c_r2_l2;
  logic [N-1:0][N-1:0] chip_bits;   // [board][chip]
  logic [N-1:0]   lvl1_out;
  logic           lvl2_out;
  logic [5:0]     lvl2_high;

  for (genvar b = 0; b < N; b++) begin : g_lvl1
    feedback_concentrator u_l1 (
      .clk(clk), .reset_1(c_r1), .reset_2(c_r2_l1), .in_bits(chip_bits[b]),
      .serial_out(lvl1_out[b]), .high_out(),
      .and_out(), .or_out(), .one_out()
    );
  end
  feedback_concentrator u_l2 (
    .clk(clk), .reset_1(c_r1), .reset_2(c_r2_l2), .in_bits(lvl1_out),
    .serial_out(lvl2_out), .high_out(lvl2_high),
    .and_out(), .or_out(), .one_out()
  );

  logic [7:0] val [N];
  logic [7:0] cnt [N][N];

  initial begin
    longint expect_sum, got;
    int first_cycle, last_cycle;

    r1 = 1'b1; r2 = 1'b1; in_bits = '0;
    c_r1 = 1'b1; c_r2_l1 = 1'b1; c_r2_l2 = 1'b1; chip_bits = '0;
    repeat (3) @(negedge clk);
    r1 = 1'b0;

    // ---- part 1: sum of 64 random bytes, three rounds ----
    for (int round = 0; round < 3; round++) begin
      expect_sum = 0;
      for (int i = 0; i < N; i++) begin
        val[i] = 8'($urandom);
        if (round == 1) val[i] = 8'hff;   // maximum values
        expect_sum += val[i];
      end
      got = 0;
      // cycle k drives bit k; reset_2 with the first bits
      for (int k = 0; k < 8 + 6; k++) begin
        for (int i = 0; i < N; i++) in_bits[i] = (k < 8) ? val[i][k] : 1'b0;
        r2 = (k == 0);
        @(negedge clk);
        // result bit k is on the serial output one cycle after input bit k
        got |= longint'(s_out) << k;
        if (k == 7) begin
          longint part;
          part = (got & 64'hff) | (longint'(h_out) << 8);
          check(part == expect_sum,
                $sformatf("round %0d: low bits + parallel high = %0d, expected %0d",
                          round, part, expect_sum));
        end
      end
      r2 = 1'b0;
      check(got == expect_sum,
            $sformatf("round %0d: flushed serial sum %0d, expected %0d", round, got, expect_sum));
      check(h_out == 0, "high bits empty after flush");
    end

    // ---- part 2: boolean summaries ----
    in_bits = '1; @(negedge clk);
    check(a_out && o_out && !one_out, "all inputs set: AND=1 OR=1 ONE=0");
    in_bits = '0; @(negedge clk);
    check(!a_out && !o_out && !one_out, "no input set: AND=0 OR=0 ONE=0");
    in_bits = '0; in_bits[37] = 1'b1; @(negedge clk);
    check(!a_out && o_out && one_out, "one input set: ONE=1");
    in_bits = '0; in_bits[3] = 1'b1; in_bits[60] = 1'b1; @(negedge clk);
    check(!a_out && o_out && !one_out, "two inputs set: ONE=0");
    in_bits = '0;

    // ---- part 3: two-level count of 4096 chip counts ----
    c_r1 = 1'b0;
    expect_sum = 0;
    for (int b = 0; b < N; b++)
      for (int c = 0; c < N; c++) begin
        cnt[b][c] = 8'($urandom_range(0, 64));
        expect_sum += cnt[b][c];
      end
    got = 0;
    first_cycle = -1;
    last_cycle = -1;
    // chips shift their 8-bit counts out in cycles 1..8, zeros afterwards
    for (int cyc = 1; cyc <= 20; cyc++) begin
      for (int b = 0; b < N; b++)
        for (int c = 0; c < N; c++)
          chip_bits[b][c] = (cyc <= 8) ? cnt[b][c][cyc-1] : 1'b0;
      // each level's D_Reg_2 is cleared as its first bits arrive
      c_r2_l1 = (cyc == 1);
      c_r2_l2 = (cyc == 2);
      @(negedge clk);
      // Sampled here: the outputs during cycle cyc+1. The level-2 result bit
      // of weight k is on its output in cycle k+3.
      if (cyc >= 2 && cyc <= 15) begin
        got |= longint'(lvl2_out) << (cyc - 2);
        if (first_cycle < 0) first_cycle = cyc + 1;
        last_cycle = cyc + 1;
      end
      if (cyc == 15) got |= longint'(lvl2_high) << 14;
    end
    check(got == expect_sum,
          $sformatf("array count %0d, expected %0d", got, expect_sum));
    check(first_cycle == 3 && last_cycle == 16,
          $sformatf("first result bit in cycle %0d, last in %0d (3 and 16 expected)",
                    first_cycle, last_cycle));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
