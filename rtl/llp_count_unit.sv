// llp_count_unit -- on-chip response count and its serial output.
//
// Every cycle an adder tree counts the PEs whose response register X is set
// and stores the count in the Local Count Register (LCR), so that at the end
// of each instruction cycle the count of the responses present during that
// cycle is ready. A "latch count" command copies either LCR or the ICAP Count
// Register (ICR, an 8-bit value loaded by the intermediate level) into the
// 8-bit Count Register (CR). From the next cycle on, a small state machine
// shifts CR out on l_count, least significant bit first, one bit per cycle,
// with no further instructions needed; after the eighth bit l_count is 0, which
// supplies the zeros the board-level Feedback Concentrator expects. Latching
// again while a count is still being shifted restarts the output with the new
// value. l_sn is the chip's local some/none: the OR of all X registers.
//
// From the document: LCR, ICR, the mux into an 8-bit CR (one bit more than a
// 64-PE count needs, to carry an 8-bit value from the intermediate level), LSB
// first serial output starting as soon as the count is latched, and the local
// some/none line. This design's choices: the command and ICR-load strobes are
// plain inputs (their instruction encoding is not published); the adder tree is
// written as a population count; the three status lines that the chip
// multiplexes between PE and intermediate-level sources are not modelled.
//
// Interface: x is the vector of X registers; latch/sel_icap choose when and
// what to latch; icr_load/icr_data load ICR; busy is high while bits remain.
// Timing: LCR holds the count of the X values of the previous cycle, so a
// latch must come at least one cycle after the instruction that set X.
module llp_count_unit #(
  parameter int unsigned N_PE = 64,
  parameter int unsigned CR_W = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N_PE-1:0]          x,
  input  logic                     latch,
  input  logic                     sel_icap,
  input  logic                     icr_load,
  input  logic [CR_W-1:0]          icr_data,
  output logic                     l_count,
  output logic                     l_sn,
  output logic                     busy
);

  localparam int unsigned LCR_W = $clog2(N_PE + 1);
  localparam int unsigned CNT_W = $clog2(CR_W + 1);

  initial begin
    assert (LCR_W <= CR_W) else $error("CR_W too small for the PE count");
  end

  logic [LCR_W-1:0] tree_sum;
  logic [LCR_W-1:0] lcr_q;
  logic [CR_W-1:0]  icr_q, cr_q;
  logic [CNT_W-1:0] left_q;   // bits still to be shifted out

  always_comb begin
    tree_sum = '0;
    for (int i = 0; i < N_PE; i++) tree_sum = tree_sum + LCR_W'(x[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lcr_q  <= '0;
      icr_q  <= '0;
      cr_q   <= '0;
      left_q <= '0;
    end else begin
      lcr_q <= tree_sum;
      if (icr_load) icr_q <= icr_data;
      if (latch) begin
        cr_q   <= sel_icap ? icr_q : CR_W'(lcr_q);
        left_q <= CNT_W'(CR_W);
      end else if (left_q != 0) begin
        cr_q   <= cr_q >> 1;
        left_q <= left_q - 1'b1;
      end
    end
  end

  assign busy    = (left_q != 0);
  assign l_count = busy & cr_q[0];
  assign l_sn    = |x;

endmodule
