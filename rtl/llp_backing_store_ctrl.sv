// llp_backing_store_ctrl -- corner-turning transfers between the PE caches and
// the external backing store (video RAM serial port).
//
// Inside the array a data word lies across PEs: one cache address is a column
// of 64 bits, one bit per PE. The backing store, which the intermediate level
// reads directly, must hold each PE's 8-bit field as an ordinary byte. This
// controller performs the corner turn: it reads or writes whole bytes of the
// swappable cache pages (bits 0..255 of each PE) through their 8-bit path and
// streams them to or from the video RAM's 16-bit serial port, which runs at
// twice the instruction rate. That gives 32 bits, i.e. four PE bytes, per
// instruction cycle, so one byte plane of a 64-PE chip takes 16 cycles.
// Transfers run in the background: the PEs keep executing instructions on
// their bit-serial path while the controller uses the byte path.
//
// Operation: a one-cycle `start` with `dir` (0 = cache to backing store,
// 1 = backing store to cache) and `byte_idx` (which byte of the swappable
// pages, 0..31) begins a transfer; `busy` is high for N_PE/4 cycles and `done`
// pulses in the last one. In transfer cycle k the controller moves the bytes
// of PEs 4k..4k+3. Each cycle carries two 16-bit serial-port beats, given here
// side by side: beat 0 = {byte(4k+1), byte(4k)}, beat 1 = {byte(4k+3),
// byte(4k+2)}. For stores, vram_out/vram_out_valid are driven in that cycle
// from the cache bytes read combinationally; for loads, vram_in is taken in
// that cycle and written into the caches at its end.
//
// From the document: the byte-per-PE corner turn, the 16-bit double-rate
// serial port, 16 cycles per byte, background operation. This design's
// choices: the command interface, the PE order on the port, byte bit 0 at the
// lower cache address, and a new `start` while busy being ignored.
module llp_backing_store_ctrl
  import llp_pkg::*;
#(
  parameter int unsigned N_PE = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic                       dir,
  input  logic [BYTE_IDX_W-1:0]      byte_idx,
  output logic                       busy,
  output logic                       done,
  // byte port towards the PEs
  output logic [BYTE_IDX_W-1:0]      pe_idx,
  output logic [N_PE-1:0]            pe_we,
  output logic [N_PE-1:0][7:0]       pe_wdata,
  input  logic [N_PE-1:0][7:0]       pe_rdata,
  // video RAM serial port, two 16-bit beats per cycle
  output logic [1:0][15:0]           vram_out,
  output logic                       vram_out_valid,
  input  logic [1:0][15:0]           vram_in,
  output logic                       vram_in_ready
);

  localparam int unsigned PER_CYCLE = 4;
  localparam int unsigned STEPS     = N_PE / PER_CYCLE;
  localparam int unsigned STEP_W    = (STEPS > 1) ? $clog2(STEPS) : 1;

  initial begin
    assert (N_PE % PER_CYCLE == 0) else $error("N_PE must be a multiple of 4");
  end

  logic                  busy_q, dir_q;
  logic [BYTE_IDX_W-1:0] idx_q;
  logic [STEP_W-1:0]     step_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      dir_q  <= 1'b0;
      idx_q  <= '0;
      step_q <= '0;
    end else if (!busy_q) begin
      if (start) begin
        busy_q <= 1'b1;
        dir_q  <= dir;
        idx_q  <= byte_idx;
        step_q <= '0;
      end
    end else begin
      if (step_q == STEP_W'(STEPS - 1)) busy_q <= 1'b0;
      step_q <= step_q + 1'b1;
    end
  end

  assign busy   = busy_q;
  assign done   = busy_q && (step_q == STEP_W'(STEPS - 1));
  assign pe_idx = idx_q;

  always_comb begin
    pe_we    = '0;
    pe_wdata = '0;
    vram_out = '0;
    for (int j = 0; j < PER_CYCLE; j++) begin
      int unsigned p;
      p = int'(step_q) * PER_CYCLE + j;
      vram_out[j/2][8*(j%2) +: 8] = pe_rdata[p];
      pe_wdata[p] = vram_in[j/2][8*(j%2) +: 8];
      pe_we[p]    = busy_q & dir_q;
    end
  end

  assign vram_out_valid = busy_q & ~dir_q;
  assign vram_in_ready  = busy_q & dir_q;

endmodule
