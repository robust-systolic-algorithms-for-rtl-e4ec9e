// Union, projection and join built on relational_engine.
//
// The engine computes comparison, intersection, difference and duplicate
// removal. The three other operations are compositions done by the host around
// it, and this testbench plays that host:
//   union      : the tuples of two relations of two tuples each are written as
//                one relation of four, duplicate removal is run, and the
//                tuples whose x is False form the union
//   projection : a relation of four three-attribute tuples is cut down to two
//                chosen columns, written as a relation of four two-attribute
//                tuples, and duplicate removal drops repeats
//   join       : the two join columns of two three-attribute relations are
//                written as A and B, comparison is run, and every True c_ij
//                pairs tuple i of the first with tuple j of the second
// Each result is held against a reference worked out here from the full
// tuples, without the engine. The engine (P = R = 4, Q = 2, eight processors)
// sits in the 3 x 3 mesh and is rerouted before every round around one
// randomly chosen faulty module. The latency of every run is checked. Counted
// mechanisms: union that dropped a repeat, projection that created a repeat,
// a join pair, a tuple that joined more than one partner, and rerouting.
module tb_relational_ops;
  import rdb_pkg::*;
  import tb_mesh_cfg_pkg::*;

  localparam int unsigned P = 4, Q = 2, R = 4, N = P + Q + R - 2;
  localparam int unsigned W = 3;   // attributes of the relations before projection / join
  localparam int unsigned T = (P+1)*(R-1) + P*(P-1) + N*(P+3) + 2;
  localparam int unsigned ALPHA = 3;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       wr_en = 1'b0, wr_rel = 1'b0;
  logic [1:0] wr_tuple = '0;
  logic [0:0] wr_attr = '0;
  elem_t      wr_data = '0;
  op_e        op = OP_COMPARE;
  logic       start = 1'b0;
  logic       busy, done;
  logic       c_mat [P][R];
  logic       x_vec [P];
  cfg_t       cfg;

  relational_engine #(.P(P), .Q(Q), .R(R)) dut (
    .clk, .rst, .cfg, .wr_en, .wr_rel, .wr_tuple, .wr_attr, .wr_data, .op,
    .start, .busy, .done, .c_mat, .x_vec
  );

  int n_union_drop = 0, n_proj_drop = 0, n_join_pair = 0, n_join_multi = 0, n_reroute = 0;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // writes a two-attribute relation into A (rel = 0) or B (rel = 1)
  task automatic write_rel(input logic rel, input elem_t t [4][Q]);
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < Q; k++) begin
        wr_en = 1'b1; wr_rel = rel; wr_tuple = 2'(i); wr_attr = 1'(k); wr_data = t[i][k];
        @(negedge clk);
      end
    wr_en = 1'b0;
  endtask

  task automatic run(input op_e o);
    int cyc;
    @(negedge clk);
    op = o; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 4 * T) begin @(negedge clk); cyc++; end
    check(cyc == T, $sformatf("%s latency %0d, expected %0d", o.name(), cyc, T));
  endtask

  // The kept tuples (keep[i]) must hold each distinct tuple of t exactly once.
  task automatic check_distinct(input elem_t t [4][Q], input logic keep [4], input string what);
    int kept_of [ALPHA][ALPHA];
    bit present [ALPHA][ALPHA];
    for (int u = 0; u < ALPHA; u++)
      for (int v = 0; v < ALPHA; v++) begin kept_of[u][v] = 0; present[u][v] = 0; end
    for (int i = 0; i < 4; i++) begin
      present[int'(t[i][0])][int'(t[i][1])] = 1;
      if (keep[i]) kept_of[int'(t[i][0])][int'(t[i][1])]++;
    end
    for (int u = 0; u < ALPHA; u++)
      for (int v = 0; v < ALPHA; v++)
        check(kept_of[u][v] == (present[u][v] ? 1 : 0),
              $sformatf("%s: <%0d,%0d> kept %0d times, present %0b", what, u, v, kept_of[u][v], present[u][v]));
  endtask

  task automatic do_union();
    elem_t a [2][Q], b [2][Q], m [4][Q];
    logic keep [4];
    int nk;
    for (int i = 0; i < 2; i++)
      for (int k = 0; k < Q; k++) begin
        a[i][k] = elem_t'($urandom_range(ALPHA - 1));
        b[i][k] = elem_t'($urandom_range(ALPHA - 1));
      end
    for (int i = 0; i < 2; i++) begin m[i] = a[i]; m[i+2] = b[i]; end
    write_rel(1'b0, m);
    run(OP_DEDUP);
    nk = 0;
    for (int i = 0; i < 4; i++) begin keep[i] = ~x_vec[i]; nk += int'(keep[i]); end
    check_distinct(m, keep, "union");
    if (nk < 4) n_union_drop++;
  endtask

  task automatic do_projection();
    elem_t full [4][W], m [4][Q];
    logic keep [4];
    int c0, c1, nk;
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < W; k++) full[i][k] = elem_t'($urandom_range(ALPHA - 1));
    c0 = $urandom_range(W - 1);
    c1 = (c0 + 1 + $urandom_range(W - 2)) % W;
    for (int i = 0; i < 4; i++) begin m[i][0] = full[i][c0]; m[i][1] = full[i][c1]; end
    write_rel(1'b0, m);
    run(OP_DEDUP);
    nk = 0;
    for (int i = 0; i < 4; i++) begin keep[i] = ~x_vec[i]; nk += int'(keep[i]); end
    check_distinct(m, keep, $sformatf("projection on columns %0d,%0d", c0, c1));
    if (nk < 4) n_proj_drop++;
  endtask

  // Join of F and G on their first two attributes; the third is carried along.
  task automatic do_join();
    elem_t f [4][W], g [4][W], fk [4][Q], gk [4][Q];
    int hw_cnt [ALPHA][ALPHA][ALPHA][ALPHA];   // joined tuple <k0,k1,f2,g2>
    int rf_cnt [ALPHA][ALPHA][ALPHA][ALPHA];
    int partners;
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < W; k++) begin
        f[i][k] = elem_t'($urandom_range(ALPHA - 1));
        g[i][k] = elem_t'($urandom_range(ALPHA - 1));
      end
    // every other round give one tuple of F the keys of two tuples of G
    if ($urandom_range(1) != 0) begin
      int i;
      i = $urandom_range(3);
      for (int k = 0; k < Q; k++) begin g[0][k] = f[i][k]; g[3][k] = f[i][k]; end
    end
    for (int i = 0; i < 4; i++)
      for (int k = 0; k < Q; k++) begin fk[i][k] = f[i][k]; gk[i][k] = g[i][k]; end
    write_rel(1'b0, fk);
    write_rel(1'b1, gk);
    run(OP_COMPARE);
    for (int a0 = 0; a0 < ALPHA; a0++) for (int a1 = 0; a1 < ALPHA; a1++)
      for (int a2 = 0; a2 < ALPHA; a2++) for (int a3 = 0; a3 < ALPHA; a3++) begin
        hw_cnt[a0][a1][a2][a3] = 0;
        rf_cnt[a0][a1][a2][a3] = 0;
      end
    for (int i = 0; i < 4; i++) begin
      partners = 0;
      for (int j = 0; j < 4; j++) begin
        if (c_mat[i][j]) begin
          hw_cnt[int'(f[i][0])][int'(f[i][1])][int'(f[i][2])][int'(g[j][2])]++;
          partners++;
          n_join_pair++;
        end
        if (f[i][0] == g[j][0] && f[i][1] == g[j][1])
          rf_cnt[int'(f[i][0])][int'(f[i][1])][int'(f[i][2])][int'(g[j][2])]++;
      end
      if (partners > 1) n_join_multi++;
    end
    for (int a0 = 0; a0 < ALPHA; a0++) for (int a1 = 0; a1 < ALPHA; a1++)
      for (int a2 = 0; a2 < ALPHA; a2++) for (int a3 = 0; a3 < ALPHA; a3++)
        check(hw_cnt[a0][a1][a2][a3] == rf_cnt[a0][a1][a2][a3],
              $sformatf("join: <%0d,%0d,%0d,%0d> produced %0d times, expected %0d",
                        a0, a1, a2, a3, hw_cnt[a0][a1][a2][a3], rf_cnt[a0][a1][a2][a3]));
  endtask

  initial begin
    tour_builder tour;
    fault_t fm;
    int fr, fc;
    tour = new();
    repeat (3) @(negedge clk);
    rst = 0;
    for (int round = 0; round < 10; round++) begin
      // one faulty module, never the I/O module; a single fault leaves the
      // other eight of a 3 x 3 mesh connected
      do begin
        fr = $urandom_range(ROWS - 1);
        fc = $urandom_range(COLS - 1);
      end while (fr == IO_R && fc == IO_C);
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) fm[r][c] = 0;
      fm[fr][fc] = 1;
      tour.build(fm);
      cfg = tour.cfg;
      check(tour.nproc == N, $sformatf("tour around (%0d,%0d) has %0d processors", fr, fc, tour.nproc));
      n_reroute++;
      @(negedge clk);
      do_union();
      do_projection();
      do_join();
    end
    check(n_union_drop > 0, "union never dropped a repeated tuple");
    check(n_proj_drop > 0,  "projection never dropped a repeated tuple");
    check(n_join_pair > 0,  "join produced no pair");
    check(n_join_multi > 0, "no tuple joined more than one partner");
    check(n_reroute > 1,    "mesh never rerouted");
    $display("mechanisms: union_drop=%0d proj_drop=%0d join_pair=%0d join_multi=%0d reroute=%0d",
             n_union_drop, n_proj_drop, n_join_pair, n_join_multi, n_reroute);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
