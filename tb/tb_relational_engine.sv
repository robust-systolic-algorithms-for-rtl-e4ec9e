// End-to-end test of relational_engine.
//
// Three engines run side by side from the same host signals:
//   dut0 : default parameters (P=4, Q=2, R=3, seven processors in the 3 x 3
//          mesh, routed as in the example with modules (1,0), (1,2) faulty)
//   dut1 : P=R=4, Q=2, eight processors in the mesh, module (0,1) faulty,
//          routed by a depth-first tour
//   dut2 : P=R=4, Q=2, the abstract pipeline with links 1,2,2,2,2,2,2,2,1
// Random relations over a small alphabet (so that matches and duplicates are
// common) are loaded and every operation is run, back to back. c_mat and x_vec
// are compared with a reference computed here directly from the relations,
// the operation latency is checked against the schedule, and dut1 and dut2
// must agree cycle for cycle: the I/O behaviour must not depend on how the
// pipeline is routed. Each mechanism (wild card passing a True c, a match, a
// mismatch, x set, difference, duplicate found, two routings) is counted and a
// mechanism that never happened counts as a failure.
module tb_relational_engine;
  import rdb_pkg::*;
  import tb_mesh_cfg_pkg::*;

  localparam int unsigned P0 = 4, Q0 = 2, R0 = 3, N0 = P0 + Q0 + R0 - 2;
  localparam int unsigned P1 = 4, Q1 = 2, R1 = 4, N1 = P1 + Q1 + R1 - 2;
  // negedges from the start pulse until done is seen: t runs 0 .. T_LAST, done follows
  localparam int unsigned T0 = (P0+1)*(R0-1) + P0*(P0-1) + N0*(P0+3) + 2;
  localparam int unsigned T1 = (P1+1)*(R1-1) + P1*(P1-1) + N1*(P1+3) + 2;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        wr_en = 1'b0, wr_rel = 1'b0;
  logic [1:0]  wr_tuple = '0;
  logic [0:0]  wr_attr = '0;
  elem_t       wr_data = '0;
  op_e         op = OP_COMPARE;
  logic        start0 = 1'b0, start1 = 1'b0;

  logic busy0, done0, busy1, done1, busy2, done2;
  logic c0 [P0][R0];
  logic x0 [P0];
  logic c1 [P1][R1];
  logic x1 [P1];
  logic c2 [P1][R1];
  logic x2 [P1];

  cfg_t cfg0, cfg1;

  relational_engine dut0 (
    .clk, .rst, .cfg (cfg0), .wr_en, .wr_rel, .wr_tuple, .wr_attr, .wr_data, .op,
    .start (start0), .busy (busy0), .done (done0), .c_mat (c0), .x_vec (x0)
  );
  relational_engine #(.P(P1), .Q(Q1), .R(R1)) dut1 (
    .clk, .rst, .cfg (cfg1), .wr_en, .wr_rel, .wr_tuple, .wr_attr, .wr_data, .op,
    .start (start1), .busy (busy1), .done (done1), .c_mat (c1), .x_vec (x1)
  );
  relational_engine #(.P(P1), .Q(Q1), .R(R1), .USE_MESH(1'b0),
                      .LINK_LEN({8'd1, 8'd2, 8'd2, 8'd2, 8'd2, 8'd2, 8'd2, 8'd2, 8'd1})) dut2 (
    .clk, .rst, .cfg (cfg1), .wr_en, .wr_rel, .wr_tuple, .wr_attr, .wr_data, .op,
    .start (start1), .busy (busy2), .done (done2), .c_mat (c2), .x_vec (x2)
  );

  elem_t ra [P1][Q1];
  elem_t rb [R1][Q1];

  // mechanism counters
  int n_wc_pass = 0, n_match = 0, n_mismatch = 0, n_xset = 0;
  int n_diff = 0, n_dup = 0, n_routes_agree = 0, n_back_to_back = 0;

  // Wild card meeting a True c value in the first processor of dut2.
  always @(posedge clk)
    if (!rst && dut2.g_pipe.u_array.g_stage[0].u_proc.pe_in.c && dut2.g_pipe.u_array.g_stage[0].u_proc.pe_in.a.wc)
      n_wc_pass++;

  // The two routings of the same problem must look identical at the port.
  always @(posedge clk)
    if (!rst) begin
      if (dut1.u_seq.port_i != dut2.u_seq.port_i || busy1 != busy2 || done1 != done2) begin
        failures++;
        $display("FAIL: routings differ at the I/O port at %0t", $time);
      end
    end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load(input int alphabet);
    for (int i = 0; i < P1; i++)
      for (int k = 0; k < Q1; k++) ra[i][k] = elem_t'($urandom_range(alphabet - 1));
    for (int j = 0; j < R1; j++)
      for (int k = 0; k < Q1; k++) rb[j][k] = elem_t'($urandom_range(alphabet - 1));
    // sometimes plant a tuple of A into B so that matches are frequent
    if ($urandom_range(1) != 0) begin
      int i, j;
      i = $urandom_range(P1 - 1); j = $urandom_range(R0 - 1);
      for (int k = 0; k < Q1; k++) rb[j][k] = ra[i][k];
    end
    @(negedge clk);
    for (int i = 0; i < P1; i++)
      for (int k = 0; k < Q1; k++) begin
        wr_en = 1; wr_rel = 0; wr_tuple = 2'(i); wr_attr = 1'(k); wr_data = ra[i][k];
        @(negedge clk);
      end
    for (int j = 0; j < R1; j++)
      for (int k = 0; k < Q1; k++) begin
        wr_en = 1; wr_rel = 1; wr_tuple = 2'(j); wr_attr = 1'(k); wr_data = rb[j][k];
        @(negedge clk);
      end
    wr_en = 0;
  endtask

  function automatic logic eq_ab(int i, int j);
    for (int k = 0; k < Q1; k++) if (ra[i][k] != rb[j][k]) return 1'b0;
    return 1'b1;
  endfunction
  function automatic logic eq_aa(int i, int j);
    for (int k = 0; k < Q1; k++) if (ra[i][k] != ra[j][k]) return 1'b0;
    return 1'b1;
  endfunction

  // Runs one operation; back = 1 starts it right after the previous done.
  task automatic run(input op_e o, input bit use0);
    int cyc = 0;
    logic e, xr;
    @(negedge clk);
    op = o; start1 = 1; start0 = use0;
    @(negedge clk);
    start1 = 0; start0 = 0;
    cyc = 1;
    while (!done1) begin @(negedge clk); cyc++; end
    check(cyc == T1, $sformatf("dut1 latency %0d, expected %0d", cyc, T1));
    if (use0) check(!busy0 && cyc >= T0, "dut0 finished");
    // reference for dut1 / dut2 (P=R=4)
    for (int i = 0; i < P1; i++) begin
      xr = 1'b0;
      for (int j = 0; j < R1; j++) begin
        e = (o == OP_DEDUP) ? (eq_aa(i, j) && i < j) : eq_ab(i, j);
        xr |= e;
        check(c1[i][j] == e && c2[i][j] == e, $sformatf("op %s c[%0d][%0d]=%0b/%0b ref %0b",
              o.name(), i+1, j+1, c1[i][j], c2[i][j], e));
        if (o == OP_COMPARE) begin if (e) n_match++; else n_mismatch++; end
      end
      if (o == OP_DIFFERENCE) begin xr = ~xr; n_diff++; end
      if (o == OP_DEDUP && xr) n_dup++;
      if (o == OP_INTERSECT && xr) n_xset++;
      check(x1[i] == xr && x2[i] == xr, $sformatf("op %s x[%0d]=%0b/%0b ref %0b",
            o.name(), i+1, x1[i], x2[i], xr));
    end
    n_routes_agree++;
    // reference for dut0 (R = 3: first three tuples of B)
    if (use0) begin
      for (int i = 0; i < P0; i++) begin
        xr = 1'b0;
        for (int j = 0; j < R0; j++) begin
          e = eq_ab(i, j);
          xr |= e;
          check(c0[i][j] == e, $sformatf("dut0 op %s c[%0d][%0d]=%0b ref %0b", o.name(), i+1, j+1, c0[i][j], e));
        end
        if (o == OP_DIFFERENCE) xr = ~xr;
        check(x0[i] == xr, $sformatf("dut0 op %s x[%0d]=%0b ref %0b", o.name(), i+1, x0[i], xr));
      end
    end
  endtask

  initial begin
    tour_builder tour;
    fault_t f;
    tour = new();
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) f[r][c] = 0;
    f[0][1] = 1;
    tour.build(f);
    cfg1 = tour.cfg;
    cfg0 = example_cfg();
    check(tour.nproc == 8, "depth-first tour of eight modules");
    repeat (3) @(negedge clk);
    rst = 0;
    for (int round = 0; round < 12; round++) begin
      load(round < 6 ? 2 : 3);
      run(OP_COMPARE, 1);
      run(OP_INTERSECT, 1);
      n_back_to_back++;
      run(OP_DIFFERENCE, 1);
      run(OP_DEDUP, 0);
    end
    check(n_wc_pass > 0,      "wild card never met a True c value");
    check(n_match > 0,        "no tuple match happened");
    check(n_mismatch > 0,     "no tuple mismatch happened");
    check(n_xset > 0,         "intersection never set x");
    check(n_diff > 0,         "difference never ran");
    check(n_dup > 0,          "no duplicate was found");
    check(n_routes_agree > 0, "two routings never compared");
    $display("mechanisms: wc_pass=%0d match=%0d mismatch=%0d xset=%0d diff=%0d dup=%0d routes=%0d back_to_back=%0d",
             n_wc_pass, n_match, n_mismatch, n_xset, n_diff, n_dup, n_routes_agree, n_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
