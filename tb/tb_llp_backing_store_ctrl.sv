// tb_llp_backing_store_ctrl -- self-checking test of the corner-turning
// backing-store controller.
//
// The testbench models the byte ports of 64 PE caches as a plain array. A store
// transfer must put byte b of every PE on the serial-port beats, four PEs per
// cycle in PE order, in exactly 16 cycles; a load transfer must write the beats
// supplied by the testbench into byte b of every PE and touch no other byte.
module tb_llp_backing_store_ctrl;
  import llp_pkg::*;

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

  logic rst_n, start, dir, busy, done, out_valid, in_ready;
  logic [BYTE_IDX_W-1:0] byte_idx, pe_idx;
  logic [N-1:0] pe_we;
  logic [N-1:0][7:0] pe_wdata, pe_rdata;
  logic [1:0][15:0] vram_out, vram_in;

  llp_backing_store_ctrl #(.N_PE(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .dir(dir), .byte_idx(byte_idx),
    .busy(busy), .done(done), .pe_idx(pe_idx), .pe_we(pe_we),
    .pe_wdata(pe_wdata), .pe_rdata(pe_rdata), .vram_out(vram_out),
    .vram_out_valid(out_valid), .vram_in(vram_in), .vram_in_ready(in_ready)
  );

  // model of the PE caches' byte ports
  logic [7:0] cache [N][32];
  always_comb
    for (int p = 0; p < N; p++) pe_rdata[p] = cache[p][pe_idx];
  always_ff @(posedge clk)
    for (int p = 0; p < N; p++)
      if (pe_we[p]) cache[p][pe_idx] <= pe_wdata[p];

  logic [7:0] stream [N];

  initial begin
    int cycles;
    bit order_ok;
    logic [7:0] saved [N][32];

    rst_n = 1'b0; start = 1'b0; dir = 1'b0; byte_idx = '0; vram_in = '0;
    for (int p = 0; p < N; p++)
      for (int b = 0; b < 32; b++) cache[p][b] = 8'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- store byte 13 of every PE to the backing store ----
    for (int rep = 0; rep < 2; rep++) begin
      byte_idx = (rep == 0) ? 5'd13 : 5'd31;
      dir = 1'b0; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles = 0;
      order_ok = 1'b1;
      while (busy) begin
        check(out_valid && !in_ready, "store: port direction");
        stream[4*cycles]   = vram_out[0][7:0];
        stream[4*cycles+1] = vram_out[0][15:8];
        stream[4*cycles+2] = vram_out[1][7:0];
        stream[4*cycles+3] = vram_out[1][15:8];
        if (done != (cycles == 15)) order_ok = 1'b0;
        cycles++;
        @(negedge clk);
        if (cycles > 40) break;
      end
      check(cycles == 16, $sformatf("store took %0d cycles, expected 16", cycles));
      check(order_ok, "done pulses in the last transfer cycle");
      for (int p = 0; p < N; p++)
        check(stream[p] == cache[p][byte_idx],
              $sformatf("store: PE %0d byte %0d = %02h, expected %02h",
                        p, byte_idx, stream[p], cache[p][byte_idx]));
    end

    // ---- load new data into byte 2 of every PE ----
    for (int p = 0; p < N; p++) stream[p] = 8'($urandom);
    saved = cache;
    byte_idx = 5'd2; dir = 1'b1; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    byte_idx = 5'd9;   // must be ignored once started
    cycles = 0;
    while (busy) begin
      check(in_ready && !out_valid, "load: port direction");
      vram_in[0] = {stream[4*cycles+1], stream[4*cycles]};
      vram_in[1] = {stream[4*cycles+3], stream[4*cycles+2]};
      cycles++;
      @(negedge clk);
      if (cycles > 40) break;
    end
    check(cycles == 16, $sformatf("load took %0d cycles, expected 16", cycles));
    for (int p = 0; p < N; p++) begin
      check(cache[p][2] == stream[p],
            $sformatf("load: PE %0d byte 2 = %02h, expected %02h", p, cache[p][2], stream[p]));
      for (int b = 0; b < 32; b++)
        if (b != 2 && cache[p][b] != saved[p][b]) begin
          check(1'b0, $sformatf("load disturbed PE %0d byte %0d", p, b));
        end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
