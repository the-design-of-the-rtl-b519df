// llp_pe -- one bit-serial processing element of the low-level (CAAPP) array.
//
// Every cycle the PE performs one read-modify-write step of the broadcast
// instruction: two one-bit operands I and J are selected (each optionally
// complemented), a one-bit function R of them is formed, and C_r ^ R is
// written to the destination, all in the same clock cycle (one cycle per
// instruction). Memory is an operand like any register, and a neighbour's
// memory bit at the same address is just another source, so a mesh move is a
// memory-to-memory transfer.
//
// State: activity A, response X (also the PE's drive into the Coterie
// Network), general registers B and Y, carry Z, Coterie switch registers MR
// and SB (4 bits each), and a 320-bit cache. Cache bits 0..255 (two 128-bit
// pages) also have a byte port used by the backing-store controller, and by
// the instructions that move MR/SB to or from memory.
//
// Interface: `instr`/`instr_valid` is the broadcast instruction; nbr_* are the
// neighbours' memory bits; `coterie_in` is the wired-OR value of the PE's
// Coterie group, used by function 0 and by the some/none inhibit modes;
// `icap_in` is a bit supplied by the intermediate level (function 7).
// `mem_bit` is this PE's memory bit at the instruction address, sent to its
// four neighbours. The byte port (bs_*) reads combinationally and writes at
// the clock edge; in the same cycle an instruction's write to the same bit
// wins.
//
// From the document: the register set, the source, function, destination and
// inhibit encodings, combined A/X writes, memory as operand, neighbour reads
// as sources, the cache size and the byte path on the swappable pages. This
// design's own choices: the carry Z is held active-low so that the printed
// add (~I + ~J + ~Z) chains from bit to bit; the some/none used by the inhibit
// modes is the PE's own Coterie group; an inhibited PE writes nothing; byte
// operations address the byte containing `addr` (addr[7:3]); MR is the low
// nibble of that byte and SB the high nibble; all state, cache included,
// clears on reset; destination code 0 writes nothing.
module llp_pe
  import llp_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  instr_t                instr,
  input  logic                  instr_valid,
  input  logic                  nbr_n,
  input  logic                  nbr_s,
  input  logic                  nbr_e,
  input  logic                  nbr_w,
  input  logic                  coterie_in,
  input  logic                  icap_in,
  output logic                  mem_bit,
  output logic                  a_out,
  output logic                  x_out,
  output logic [3:0]            mr_out,
  output logic [3:0]            sb_out,
  // byte port of the swappable pages
  input  logic [BYTE_IDX_W-1:0] bs_idx,
  input  logic                  bs_we,
  input  logic [7:0]            bs_wdata,
  output logic [7:0]            bs_rdata
);

  logic [CACHE_BITS-1:0] mem;
  logic a_q, b_q, x_q, y_q, z_q;
  logic [3:0] mr_q, sb_q;

  logic src_i, src_j, op_i, op_j, r, d, active;
  logic sum, carry;
  logic in_swap;
  logic [BYTE_IDX_W-1:0] byte_idx;
  logic [7:0] mem_byte;

  assign in_swap  = (instr.addr < ADDR_W'(2 * PAGE_BITS));
  assign byte_idx = instr.addr[BYTE_IDX_W+2:3];
  assign mem_byte = in_swap ? mem[{1'b0, byte_idx, 3'b000} +: 8] : 8'h00;
  assign mem_bit  = (instr.addr < ADDR_W'(CACHE_BITS)) ? mem[instr.addr] : 1'b0;
  assign bs_rdata = mem[{1'b0, bs_idx, 3'b000} +: 8];

  always_comb begin
    unique case (instr.s_i)
      SRC_ZERO: src_i = 1'b0;
      SRC_C:    src_i = z_q;
      SRC_NBR0: src_i = nbr_s;
      SRC_NBR1: src_i = nbr_n;
      SRC_Y:    src_i = y_q;
      SRC_X:    src_i = x_q;
      SRC_B:    src_i = b_q;
      SRC_A:    src_i = a_q;
      SRC_MEM:  src_i = mem_bit;
      default:  src_i = 1'b0;
    endcase
    unique case (instr.s_j)
      SRC_ZERO: src_j = 1'b0;
      SRC_C:    src_j = z_q;
      SRC_NBR0: src_j = nbr_e;
      SRC_NBR1: src_j = nbr_w;
      SRC_Y:    src_j = y_q;
      SRC_X:    src_j = x_q;
      SRC_B:    src_j = b_q;
      SRC_A:    src_j = a_q;
      SRC_MEM:  src_j = mem_bit;
      default:  src_j = 1'b0;
    endcase
    op_i = instr.c_i ^ src_i;
    op_j = instr.c_j ^ src_j;

    // Full add of the complemented operands; Z holds the carry inverted.
    sum   = ~op_i ^ ~op_j ^ ~z_q;
    carry = (~op_i & ~op_j) | (~op_i & ~z_q) | (~op_j & ~z_q);

    unique case (instr.ftn)
      FTN_COTERIE: r = coterie_in;
      FTN_I:       r = op_i;
      FTN_J:       r = op_j;
      FTN_NAND:    r = ~(op_i & op_j);
      FTN_NOR:     r = ~(op_i | op_j);
      FTN_XNOR:    r = ~(op_i ^ op_j);
      FTN_ADD:     r = sum;
      FTN_ICAP:    r = icap_in;
      default:     r = 1'b0;
    endcase
    d = instr.c_r ^ r;

    unique case (instr.inh)
      INH_NONE:   active = 1'b1;
      INH_A:      active = a_q;
      INH_A_SOME: active = a_q & ~coterie_in;
      INH_A_NONE: active = a_q & coterie_in;
      default:    active = 1'b0;
    endcase
    active = active & instr_valid;
  end

  logic is_alu;
  assign is_alu = (instr.ftn <= FTN_ICAP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= 1'b0;
      b_q  <= 1'b0;
      x_q  <= 1'b0;
      y_q  <= 1'b0;
      z_q  <= 1'b1;   // inverted carry: 1 means no carry
      mr_q <= '0;
      sb_q <= '0;
      mem  <= '0;
    end else begin
      // Backing-store byte write first, so an instruction write to the same
      // bit in the same cycle takes precedence.
      if (bs_we) mem[{1'b0, bs_idx, 3'b000} +: 8] <= bs_wdata;
      if (active) begin
        if (is_alu) begin
          unique case (instr.dest)
            DST_AX:   begin a_q <= d; x_q <= d;    end
            DST_AX_I: begin a_q <= d; x_q <= op_i; end
            DST_AX_J: begin a_q <= d; x_q <= op_j; end
            DST_Y:    y_q <= d;
            DST_X:    x_q <= d;
            DST_B:    b_q <= d;
            DST_A:    a_q <= d;
            DST_MEM:  if (instr.addr < ADDR_W'(CACHE_BITS)) mem[instr.addr] <= d;
            default:  ;
          endcase
          if (instr.ftn == FTN_ADD) z_q <= ~carry;
        end else begin
          unique case (instr.ftn)
            FTN_LOADZ:  z_q <= op_i;
            FTN_M2MR:   mr_q <= mem_byte[3:0];
            FTN_M2MRSB: begin mr_q <= mem_byte[3:0]; sb_q <= mem_byte[7:4]; end
            FTN_MR2M:   if (in_swap) mem[{1'b0, byte_idx, 3'b000} +: 4] <= mr_q;
            FTN_MRSB2M: if (in_swap) mem[{1'b0, byte_idx, 3'b000} +: 8] <= {sb_q, mr_q};
            default:    ;
          endcase
        end
      end
    end
  end

  assign a_out  = a_q;
  assign x_out  = x_q;
  assign mr_out = mr_q;
  assign sb_out = sb_q;

endmodule
