// llp_pkg -- shared types and constants of the low-level (CAAPP) processor.
//
// The low-level array is SIMD: every processing element (PE) receives the same
// 32-bit instruction word each cycle. This package defines that word and the
// encodings of its fields.
//
// Instruction word (bit positions follow the published instruction format):
//   [31]    must be 0
//   [30:29] INH   activity control (inhibit mode)
//   [28]    C_r   complement applied to the function result
//   [27:24] Ftn   function
//   [23]    C_i   complement applied to source I
//   [22:19] S_i   source I
//   [18]    C_j   complement applied to source J
//   [17:14] S_j   source J
//   [13:10] Dest  destination
//   [9]     must be 0
//   [8:0]   Address  bit address in the PE cache
// The field widths between the printed bit numbers are this design's reading:
// four bits for each of Ftn, S_i, S_j and Dest is the smallest width that holds
// the codes of the instruction-set table.
package llp_pkg;

  // Per-PE cache: 320 bits are implemented, the address space allows 512.
  localparam int unsigned CACHE_BITS = 320;
  localparam int unsigned ADDR_W     = 9;
  // Pages of 128 bits; pages 0 and 1 are swappable with the backing store and
  // have an 8-bit (byte) data path.
  localparam int unsigned PAGE_BITS  = 128;
  localparam int unsigned BYTE_IDX_W = 5;   // 32 bytes in pages 0 and 1

  typedef enum logic [1:0] {
    INH_NONE     = 2'd0,  // always active (global override)
    INH_A        = 2'd1,  // inhibit if A = 0
    INH_A_SOME   = 2'd2,  // inhibit if A = 0 or some/none = Some
    INH_A_NONE   = 2'd3   // inhibit if A = 0 or some/none = None
  } inh_e;

  // Source codes. I and J share the encoding except for codes 2 and 3, which
  // select the South/North neighbour for I and the East/West neighbour for J.
  typedef enum logic [3:0] {
    SRC_ZERO = 4'd0,
    SRC_C    = 4'd1,   // carry register (Z)
    SRC_NBR0 = 4'd2,   // I: South   J: East
    SRC_NBR1 = 4'd3,   // I: North   J: West
    SRC_Y    = 4'd4,
    SRC_X    = 4'd5,
    SRC_B    = 4'd6,
    SRC_A    = 4'd7,
    SRC_MEM  = 4'd8
  } src_e;

  typedef enum logic [3:0] {
    FTN_COTERIE = 4'd0,   // Coterie network value -> R
    FTN_I       = 4'd1,   // I -> R
    FTN_J       = 4'd2,   // J -> R
    FTN_NAND    = 4'd3,   // ~(I & J) -> R
    FTN_NOR     = 4'd4,   // ~(I | J) -> R
    FTN_XNOR    = 4'd5,   // ~(I ^ J) -> R
    FTN_ADD     = 4'd6,   // ~I + ~J + ~Z -> R (sum), carry -> Z
    FTN_ICAP    = 4'd7,   // bit from the intermediate level -> R
    FTN_LOADZ   = 4'd8,   // I -> Z
    FTN_M2MR    = 4'd9,   // memory byte -> MR
    FTN_M2MRSB  = 4'd10,  // memory byte -> MR, SB
    FTN_MR2M    = 4'd11,  // MR -> memory byte
    FTN_MRSB2M  = 4'd12   // MR, SB -> memory byte
  } ftn_e;

  typedef enum logic [3:0] {
    DST_NONE  = 4'd0,
    DST_AX    = 4'd1,   // A and X <- result
    DST_AX_I  = 4'd2,   // A <- result, X <- I
    DST_AX_J  = 4'd3,   // A <- result, X <- J
    DST_Y     = 4'd4,
    DST_X     = 4'd5,
    DST_B     = 4'd6,
    DST_A     = 4'd7,
    DST_MEM   = 4'd8
  } dest_e;

  typedef struct packed {
    logic              zero_hi;
    inh_e              inh;
    logic              c_r;
    ftn_e              ftn;
    logic              c_i;
    src_e              s_i;
    logic              c_j;
    src_e              s_j;
    dest_e             dest;
    logic              zero_lo;
    logic [ADDR_W-1:0] addr;
  } instr_t;

  function automatic instr_t make_instr(inh_e inh, logic c_r, ftn_e ftn,
                                        logic c_i, src_e s_i, logic c_j, src_e s_j,
                                        dest_e dest, logic [ADDR_W-1:0] addr);
    instr_t w;
    w.zero_hi = 1'b0;
    w.inh     = inh;
    w.c_r     = c_r;
    w.ftn     = ftn;
    w.c_i     = c_i;
    w.s_i     = s_i;
    w.c_j     = c_j;
    w.s_j     = s_j;
    w.dest    = dest;
    w.zero_lo = 1'b0;
    w.addr    = addr;
    return w;
  endfunction

endpackage
