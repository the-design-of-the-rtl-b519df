// tb_llp_coterie -- self-checking test of the Coterie Network.
//
// The reference is a union-find over an explicit switch graph built in the
// testbench: every PE contributes a centre node and four arm nodes; MR[k]
// joins the centre to arm k, SB[k] joins arm k to arm k+1, and facing arms of
// neighbouring PEs are one wire. Each PE must read the OR of the X values of
// all centres in its component. Directed cases: all switches open, one
// horizontal bus per row, a single broadcaster on a full mesh, a serpentine
// path through every PE (the longest propagation), and paths that use only
// bypass switches; then random switch settings of varying density.
module tb_llp_coterie;

  localparam int R = 8;
  localparam int C = 8;
  localparam int N = R * C;

  int checks = 0;
  int failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  logic clk = 1'b0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0]      x, grp;
  logic [N-1:0][3:0] mr, sb;

  llp_coterie #(.ROWS(R), .COLS(C)) dut (.x(x), .mr(mr), .sb(sb), .grp(grp));

  // ---------------- union-find reference ----------------
  int parent [5*N];

  function automatic int find(int a);
    while (parent[a] != a) a = parent[a];
    return a;
  endfunction

  function automatic void unite(int a, int b);
    int ra, rb;
    ra = find(a);
    rb = find(b);
    if (ra != rb) parent[ra] = rb;
  endfunction

  // node numbers: centre of PE p = 5p, arm k of PE p = 5p+1+k (0=W 1=N 2=E 3=S)
  task automatic check_all(string what);
    bit orv [5*N];
    int bad;
    for (int i = 0; i < 5*N; i++) parent[i] = i;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        int p;
        p = r*C + c;
        for (int k = 0; k < 4; k++) begin
          if (mr[p][k]) unite(5*p, 5*p+1+k);
          if (sb[p][k]) unite(5*p+1+k, 5*p+1+((k+1)%4));
        end
        if (c < C-1) unite(5*p+1+2, 5*(p+1)+1+0);
        if (r < R-1) unite(5*p+1+3, 5*(p+C)+1+1);
      end
    for (int i = 0; i < 5*N; i++) orv[i] = 0;
    for (int p = 0; p < N; p++) if (x[p]) orv[find(5*p)] = 1;
    #1;
    bad = 0;
    for (int p = 0; p < N; p++)
      if (grp[p] != orv[find(5*p)]) bad++;
    check(bad == 0, $sformatf("%s: %0d PEs read a wrong group value", what, bad));
  endtask

  initial begin
    x = '0; mr = '0; sb = '0;
    #1;

    // all switches open: every PE reads its own X
    for (int t = 0; t < 5; t++) begin
      x = {$urandom, $urandom};
      check_all("isolated");
      check(grp == x, "isolated: group value equals own X");
    end

    // row busses: W and E arms joined to every PE
    for (int p = 0; p < N; p++) mr[p] = 4'b0101;
    for (int t = 0; t < 5; t++) begin
      x = '0;
      x[$urandom_range(0, N-1)] = 1'b1;
      check_all("row busses");
    end

    // full mesh, single broadcaster in the far corner
    for (int p = 0; p < N; p++) mr[p] = 4'b1111;
    x = '0; x[N-1] = 1'b1;
    check_all("full mesh broadcast");
    check(grp == '1, "full mesh: everybody hears the broadcaster");

    // serpentine through all PEs: rows joined W-E, alternate ends joined N-S
    mr = '0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        logic [3:0] m;
        m = 4'b0000;
        if (c > 0)   m[0] = 1'b1;
        if (c < C-1) m[2] = 1'b1;
        if ((r % 2 == 0) && c == C-1 && r < R-1) m[3] = 1'b1;
        if ((r % 2 == 1) && c == C-1) m[1] = 1'b1;
        if ((r % 2 == 1) && c == 0 && r < R-1) m[3] = 1'b1;
        if ((r % 2 == 0) && c == 0 && r > 0) m[1] = 1'b1;
        mr[r*C+c] = m;
      end
    x = '0; x[0] = 1'b1;
    check_all("serpentine");
    check(grp == '1, "serpentine: signal reaches the far end");

    // bypass only: row 3 passes W->E through bypasses (W-N, N-E) except the ends
    mr = '0; sb = '0;
    for (int c = 1; c < C-1; c++) sb[3*C+c] = 4'b0011;
    mr[3*C+0] = 4'b0100;
    mr[3*C+C-1] = 4'b0001;
    x = '0; x[3*C] = 1'b1;
    check_all("bypass row");
    check(grp[3*C+C-1] && !grp[3*C+3], "bypass: far end hears, bypassed PE does not");

    // random settings
    for (int t = 0; t < 400; t++) begin
      int dens;
      dens = $urandom_range(1, 9);
      for (int p = 0; p < N; p++)
        for (int k = 0; k < 4; k++) begin
          mr[p][k] = ($urandom_range(0, 9) < dens);
          sb[p][k] = ($urandom_range(0, 9) < dens / 3);
        end
      x = '0;
      for (int p = 0; p < N; p++) x[p] = ($urandom_range(0, 19) == 0);
      check_all($sformatf("random %0d", t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
