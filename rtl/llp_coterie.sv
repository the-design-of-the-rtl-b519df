// llp_coterie -- the Coterie Network of one chip's PE array.
//
// The Coterie Network is a mesh whose connections are switches rather than
// wires with logic: each PE can join or isolate its four arms (West, North,
// East, South), and arms can be joined to each other inside a node so that a
// signal bypasses that PE. Every set of PEs that the closed switches connect
// is a "coterie"; within it the X (response) registers of all members are
// wire-ORed, and every member reads the result in the same cycle. With one PE
// driving, this is a local broadcast; with many, it is a some/none test that
// runs independently in every group.
//
// Switch model (this design's reading of the network figure): arm k of a node
// is the wire to the neighbour on side k (0=W, 1=N, 2=E, 3=S). MR[k] closed
// joins arm k to the PE itself (its X drive and its read-back); SB[k] closed
// joins arm k directly to arm (k+1) mod 4, a diagonal bypass that does not
// touch the PE. With all switches of a node open, the PE forms a group of its
// own and reads back its own X. Arms on the array boundary lead nowhere.
//
// Implementation: purely combinational. The physical network settles by
// electrical propagation within one cycle; here the group values are found by
// repeated relaxation over the inter-PE links. Within a node the closure is
// computed exactly, so each pass carries a value across one PE; a path can
// cross a node at most twice, so ITERS = 2*ROWS*COLS+1 passes are always
// enough. The loop stops early once a pass changes nothing, which keeps
// simulation fast for typical switch settings; the result is the same.
//
// Interface: x, mr, sb per PE (row-major, PE 0 at the north-west corner);
// grp is the wired-OR value each PE reads.
module llp_coterie #(
  parameter int unsigned ROWS  = 8,
  parameter int unsigned COLS  = 8,
  parameter int unsigned ITERS = 2 * ROWS * COLS + 1
) (
  input  logic [ROWS*COLS-1:0]      x,
  input  logic [ROWS*COLS-1:0][3:0] mr,
  input  logic [ROWS*COLS-1:0][3:0] sb,
  output logic [ROWS*COLS-1:0]      grp
);

  // Value of arm k after closing the bypass ring inside a node: the OR of
  // every arm reachable from k through closed SB switches.
  function automatic logic [3:0] ring_close(logic [3:0] v, logic [3:0] s);
    logic [3:0] o;
    for (int k = 0; k < 4; k++) begin
      logic [1:0] k1, k2, k3;
      k1 = 2'(k + 1);
      k2 = 2'(k + 2);
      k3 = 2'(k + 3);
      // clockwise: k -> k+1 uses s[k], k+1 -> k+2 uses s[k1], ...
      // counter-clockwise: k -> k-1 uses s[k3], k-1 -> k-2 uses s[k2], ...
      o[k] = v[k]
           | (s[k] & v[k1])
           | (s[k] & s[k1] & v[k2])
           | (s[k] & s[k1] & s[k2] & v[k3])
           | (s[k3] & v[k3])
           | (s[k3] & s[k2] & v[k2])
           | (s[k3] & s[k2] & s[k1] & v[k1]);
    end
    return o;
  endfunction

  // Per-row switch masks, one bit per PE of the row:
  //   reach[r][k][j] - arm k reaches arm j through the bypass ring
  //   hub[r][k]      - arm k's ring segment contains a closed MR switch
  //   mrv[r][k]      - MR[k] closed
  logic [COLS-1:0] reach [ROWS][4][4];
  logic [COLS-1:0] hub   [ROWS][4];
  logic [COLS-1:0] mrv   [ROWS][4];
  logic [COLS-1:0] xr    [ROWS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned P = r * COLS + c;
      logic [3:0] hb;
      logic [3:0] rc [4];
      assign hb = ring_close(mr[P], sb[P]);
      assign xr[r][c] = x[P];
      for (genvar j = 0; j < 4; j++) begin : g_arm
        assign rc[j]           = ring_close(4'(1 << j), sb[P]);
        assign hub[r][j][c]    = hb[j];
        assign mrv[r][j][c]    = mr[P][j];
        assign reach[r][0][j][c] = rc[j][0];
        assign reach[r][1][j][c] = rc[j][1];
        assign reach[r][2][j][c] = rc[j][2];
        assign reach[r][3][j][c] = rc[j][3];
      end
    end
  end

  // Relaxation over the links. hl[r] bit c is the link on the west side of
  // PE (r,c) (bit COLS is the east boundary); vl[r] bit c is the link on the
  // north side of PE (r,c) (row ROWS is the south boundary).
  always_comb begin
    logic [COLS:0]   hl [ROWS];
    logic [COLS-1:0] vl [ROWS+1];
    logic [COLS:0]   hn [ROWS];
    logic [COLS-1:0] vn [ROWS+1];
    logic [COLS-1:0] arm [4];
    logic [COLS-1:0] ring [4];
    logic [COLS-1:0] fin [4];
    logic [COLS-1:0] centre;
    logic changed;

    for (int r = 0; r < ROWS; r++) hl[r] = '0;
    for (int r = 0; r <= ROWS; r++) vl[r] = '0;
    grp = '0;

    for (int it = 0; it < ITERS; it++) begin
      hn = hl;
      vn = vl;
      for (int r = 0; r < ROWS; r++) begin
        arm[0] = hl[r][COLS-1:0];
        arm[1] = vl[r];
        arm[2] = hl[r][COLS:1];
        arm[3] = vl[r+1];
        ring[0] = (reach[r][0][0] & arm[0]) | (reach[r][0][1] & arm[1])
                | (reach[r][0][2] & arm[2]) | (reach[r][0][3] & arm[3]);
        ring[1] = (reach[r][1][0] & arm[0]) | (reach[r][1][1] & arm[1])
                | (reach[r][1][2] & arm[2]) | (reach[r][1][3] & arm[3]);
        ring[2] = (reach[r][2][0] & arm[0]) | (reach[r][2][1] & arm[1])
                | (reach[r][2][2] & arm[2]) | (reach[r][2][3] & arm[3]);
        ring[3] = (reach[r][3][0] & arm[0]) | (reach[r][3][1] & arm[1])
                | (reach[r][3][2] & arm[2]) | (reach[r][3][3] & arm[3]);
        centre = xr[r] | (mrv[r][0] & ring[0]) | (mrv[r][1] & ring[1])
                       | (mrv[r][2] & ring[2]) | (mrv[r][3] & ring[3]);
        fin[0] = ring[0] | (hub[r][0] & centre);
        fin[1] = ring[1] | (hub[r][1] & centre);
        fin[2] = ring[2] | (hub[r][2] & centre);
        fin[3] = ring[3] | (hub[r][3] & centre);
        grp[r*COLS +: COLS] = centre;
        hn[r]   = hn[r] | {1'b0, fin[0]} | {fin[2], 1'b0};
        vn[r]   = vn[r] | fin[1];
        vn[r+1] = vn[r+1] | fin[3];
      end
      changed = (hn != hl) || (vn != vl);
      hl = hn;
      vl = vn;
      if (!changed) break;
    end
  end

endmodule
