// tb_llp_count_unit -- self-checking test of the on-chip response count.
//
// Drives random response vectors, latches the local count or the ICAP count
// register, and collects the serial output. Checks: the 8 bits that follow a
// latch, LSB first starting in the next cycle, equal the number of set X bits
// (or the ICR value); the output is 0 once the 8 bits are out; the local
// some/none line; and that a new latch during output restarts it.
module tb_llp_count_unit;

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
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic         rst_n;
  logic [N-1:0] x;
  logic         latch, sel_icap, icr_load;
  logic [7:0]   icr_data;
  logic         l_count, l_sn, busy;

  llp_count_unit #(.N_PE(N), .CR_W(8)) dut (
    .clk(clk), .rst_n(rst_n), .x(x), .latch(latch), .sel_icap(sel_icap),
    .icr_load(icr_load), .icr_data(icr_data),
    .l_count(l_count), .l_sn(l_sn), .busy(busy)
  );

  function automatic int popcount(logic [N-1:0] v);
    int n = 0;
    for (int i = 0; i < N; i++) n += int'(v[i]);
    return n;
  endfunction

  // Latch in the current cycle and read the 8 serial bits that follow.
  task automatic latch_and_read(bit icap, output int value);
    latch = 1'b1; sel_icap = icap;
    @(negedge clk);
    latch = 1'b0;
    value = 0;
    for (int k = 0; k < 8; k++) begin
      value |= int'(l_count) << k;
      @(negedge clk);
    end
  endtask

  initial begin
    int got, expect_n;
    rst_n = 1'b0; x = '0; latch = 1'b0; sel_icap = 1'b0; icr_load = 1'b0; icr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    for (int t = 0; t < 12; t++) begin
      case (t)
        0: x = '0;
        1: x = '1;
        2: begin x = '0; x[5] = 1'b1; end
        default: x = {$urandom, $urandom};
      endcase
      expect_n = popcount(x);
      @(negedge clk);             // LCR takes the count of this cycle's X
      check(l_sn == (expect_n != 0), $sformatf("some/none for %0d responders", expect_n));
      latch_and_read(1'b0, got);
      check(got == expect_n, $sformatf("local count %0d, expected %0d", got, expect_n));
      check(l_count == 1'b0 && !busy, "output idle after 8 bits");
    end

    // ICAP count register path
    icr_data = 8'hb5; icr_load = 1'b1;
    @(negedge clk);
    icr_load = 1'b0;
    latch_and_read(1'b1, got);
    check(got == 8'hb5, $sformatf("ICAP count %0h, expected b5", got));

    // restart: latch 63, then after 3 bits latch a new count of 10
    x = '0; x[62:0] = '1;
    @(negedge clk);
    latch = 1'b1; sel_icap = 1'b0;
    @(negedge clk);
    latch = 1'b0;
    x = '0; x[9:0] = '1;
    repeat (3) @(negedge clk);
    latch_and_read(1'b0, got);
    check(got == 10, $sformatf("restarted count %0d, expected 10", got));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
