// feedback_concentrator -- 64-input serial reduction chip (board/array level).
//
// Each of the 64 inputs carries a partial count bit-serially, least
// significant bit first. Every cycle an adder tree counts the ones among the
// inputs (0..64, 7 bits) into D_Reg_1. A 7-bit carry-select adder adds
// D_Reg_1 to D_Reg_2, which holds the upper six bits of the previous cycle's
// sum: bit 0 of the sum is the next result bit and leaves on serial_out, bits
// 6..1 go back into D_Reg_2 and are also the parallel output. Summing 64
// numbers of any length therefore yields the result LSB first on serial_out,
// one cycle behind the inputs, with the top six bits on high_out one cycle
// after the last input bits. Feeding six more cycles of zeros flushes the top
// bits out serially too, which lets the chips be cascaded (64 chips at the
// first level, one at the second, counting 262,144 PEs).
//
// The auxiliary logic unit reports, for the bits held in D_Reg_1, whether all
// inputs were 1 (and_out), any was 1 (or_out) and exactly one was 1 (one_out):
// all/some, some/none and single-responder summaries.
//
// Timing: inputs sampled at the rising edge ending cycle t appear as sum bit on
// serial_out during cycle t+1. reset_1 clears D_Reg_1 and reset_2 clears
// D_Reg_2 at the clock edge (synchronous); assert reset_2 with the first input
// bits of a new count, so that no leftover high bits are added in.
//
// From the document: the adder tree, D_Reg_1 and D_Reg_2 with their resets,
// the 7-bit carry-select adder, the recirculation of bits 6..1, the serial and
// six parallel outputs, the flush with six zero cycles and the three boolean
// summaries. This design's choices: the split of the carry-select adder
// (3-bit ripple low part, 4-bit upper part computed for both carries), the
// synchronous resets, and computing the summaries from D_Reg_1. The figure
// labels the third summary EXOR while the text calls it "exactly one
// responder"; it is built as exactly one.
module feedback_concentrator #(
  parameter int unsigned N_IN   = 64,
  parameter int unsigned SUM_W  = 7,
  parameter int unsigned HIGH_W = 6
) (
  input  logic              clk,
  input  logic              reset_1,
  input  logic              reset_2,
  input  logic [N_IN-1:0]   in_bits,
  output logic              serial_out,
  output logic [HIGH_W-1:0] high_out,
  output logic              and_out,
  output logic              or_out,
  output logic              one_out
);

  initial begin
    assert (SUM_W == HIGH_W + 1 && (1 << SUM_W) > N_IN + (1 << HIGH_W) - 1)
      else $error("SUM_W/HIGH_W cannot hold the sum");
  end

  localparam int unsigned LO_W = SUM_W / 2;
  localparam int unsigned HI_W = SUM_W - LO_W;

  logic [SUM_W-1:0]  tree_sum;
  logic [SUM_W-1:0]  d_reg_1;
  logic [HIGH_W-1:0] d_reg_2;
  logic [SUM_W-1:0]  sum;

  // Adder tree ("carry shower") over the inputs.
  always_comb begin
    tree_sum = '0;
    for (int i = 0; i < N_IN; i++) tree_sum = tree_sum + SUM_W'(in_bits[i]);
  end

  // Carry-select adder: the low part ripples, the high part is computed for
  // carry-in 0 and 1 and the low part's carry picks one.
  logic [SUM_W-1:0] b_op;
  logic [LO_W:0]    lo_sum;
  logic [HI_W-1:0]  hi_sum0, hi_sum1;
  assign b_op    = SUM_W'(d_reg_2);
  assign lo_sum  = {1'b0, d_reg_1[LO_W-1:0]} + {1'b0, b_op[LO_W-1:0]};
  assign hi_sum0 = d_reg_1[SUM_W-1:LO_W] + b_op[SUM_W-1:LO_W];
  assign hi_sum1 = d_reg_1[SUM_W-1:LO_W] + b_op[SUM_W-1:LO_W] + 1'b1;
  assign sum     = {lo_sum[LO_W] ? hi_sum1 : hi_sum0, lo_sum[LO_W-1:0]};

  always_ff @(posedge clk) begin
    d_reg_1 <= reset_1 ? '0 : tree_sum;
    d_reg_2 <= reset_2 ? '0 : sum[SUM_W-1:1];
  end

  assign serial_out = sum[0];
  assign high_out   = sum[SUM_W-1:1];
  assign and_out    = (d_reg_1 == SUM_W'(N_IN));
  assign or_out     = (d_reg_1 != '0);
  assign one_out    = (d_reg_1 == SUM_W'(1));

endmodule
