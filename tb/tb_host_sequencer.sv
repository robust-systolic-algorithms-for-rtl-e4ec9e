// Self-checking test of host_sequencer.
//
// dut (P=4, Q=2, R=3) is checked against the I/O tables of the document's
// example: in every cycle of the operation its Port-A/B/C outputs must be
// exactly a_ij at the times of Table 1.A (wild card at all other times), b_ij
// at the times of Table 1.B and True on Port-C exactly at the input times of
// Table 1.C. The testbench stands in for the array: it drives random values on
// the array side, and known per-element values only at the output times of
// Table 1.C and Table 3, so c_mat and x_vec are right only if they are
// captured in exactly those cycles. The difference operation must store the
// complemented X, and a write issued while busy must not reach Port-A. dut_d (P=R=4) runs duplicate removal: Port-C must be seeded
// only for i < j and Port-B must carry the tuples of A.
module tb_host_sequencer;
  import rdb_pkg::*;
  localparam int P = 4, Q = 2, R = 3, N = P + Q + R - 2;
  localparam int T_LAST = (P+1)*(R-1) + P*(P-1) + N*(P+3);

  localparam int TA   [P][Q] = '{'{27, 32}, '{28, 33}, '{29, 34}, '{30, 35}};
  localparam int TB   [R][Q] = '{'{24, 28}, '{25, 29}, '{26, 30}};
  localparam int TCI  [P][R] = '{'{12, 17, 22}, '{8, 13, 18}, '{4, 9, 14}, '{0, 5, 10}};
  localparam int TCO  [P][R] = '{'{61, 66, 71}, '{57, 62, 67}, '{53, 58, 63}, '{49, 54, 59}};
  localparam int TXO  [P]    = '{46, 47, 48, 49};

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic wr_en = 0, wr_rel = 0, start = 0, start_d = 0;
  logic [1:0] wr_tuple = 0;
  logic [0:0] wr_attr = 0;
  elem_t wr_data = 0;
  op_e op = OP_COMPARE;
  logic busy, done, busy_d, done_d;
  lane_t to_arr, from_arr, to_arr_d;
  logic c_mat [P][R];
  logic x_vec [P];
  logic c_mat_d [4][4];
  logic x_vec_d [4];

  host_sequencer dut (.clk, .rst, .wr_en, .wr_rel, .wr_tuple, .wr_attr, .wr_data, .op, .start,
    .busy, .done, .port_o (to_arr), .port_i (from_arr), .c_mat, .x_vec);
  // dut_d only sees the loads, not the write issued while dut is busy
  logic wr_en_d;
  assign wr_en_d = wr_en & ~busy;
  host_sequencer #(.P(4), .Q(2), .R(4)) dut_d (.clk, .rst, .wr_en (wr_en_d), .wr_rel, .wr_tuple, .wr_attr,
    .wr_data, .op (OP_DEDUP), .start (start_d), .busy (busy_d), .done (done_d),
    .port_o (to_arr_d), .port_i (from_arr), .c_mat (c_mat_d), .x_vec (x_vec_d));

  elem_t ra [4][Q];
  elem_t rb [4][Q];
  logic  cval [P][R];
  logic  xval [P];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input op_e o);
    @(negedge clk);
    op = o; start = 1;
    for (int i = 0; i < P; i++) begin
      xval[i] = 1'($urandom);
      for (int j = 0; j < R; j++) cval[i][j] = 1'($urandom);
    end
    @(negedge clk);
    start = 0;
    for (int t = 0; t <= T_LAST; t++) begin
      lane_t e;
      logic  cin;
      // expected port drive
      e = '{a: '{wc: 1'b1, val: '0}, b: '0, c: 1'b0, x: 1'b0};
      for (int i = 0; i < P; i++) for (int j = 0; j < Q; j++)
        if (TA[i][j] == t) e.a = '{wc: 1'b0, val: ra[i][j]};
      for (int i = 0; i < R; i++) for (int j = 0; j < Q; j++)
        if (TB[i][j] == t) e.b = rb[i][j];
      cin = 1'b0;
      for (int i = 0; i < P; i++) for (int j = 0; j < R; j++)
        if (TCI[i][j] == t) cin = 1'b1;
      e.c = cin;
      check(busy == 1'b1 && done == 1'b0, $sformatf("busy at t=%0d", t));
      check(to_arr.a == e.a, $sformatf("t=%0d Port-A %h want %h", t, to_arr.a, e.a));
      if (e.b != 0 || t >= 24 && t <= 30) check(to_arr.b == e.b, $sformatf("t=%0d Port-B %h want %h", t, to_arr.b, e.b));
      check(to_arr.c == e.c, $sformatf("t=%0d Port-C %b want %b", t, to_arr.c, e.c));
      check(to_arr.x == 1'b0, $sformatf("t=%0d Port-X", t));
      // a write while busy must be ignored: a_11 is still checked at t = 27
      if (t == 5) begin wr_en = 1; wr_rel = 0; wr_tuple = 0; wr_attr = 0; wr_data = ~ra[0][0]; end
      if (t == 6) wr_en = 0;
      // array side: junk except at the output times
      from_arr = lane_t'({$urandom, $urandom});
      for (int i = 0; i < P; i++) for (int j = 0; j < R; j++)
        if (TCO[i][j] == t) from_arr.c = cval[i][j];
      for (int i = 0; i < P; i++) if (TXO[i] == t) from_arr.x = xval[i];
      @(negedge clk);
    end
    check(done == 1'b1 && busy == 1'b0, "done one cycle after the last extraction");
    for (int i = 0; i < P; i++) begin
      for (int j = 0; j < R; j++)
        check(c_mat[i][j] == cval[i][j], $sformatf("c_mat[%0d][%0d]", i, j));
      check(x_vec[i] == (xval[i] ^ (o == OP_DIFFERENCE)), $sformatf("%s x_vec[%0d]", o.name(), i));
    end
  endtask

  initial begin
    from_arr = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int round = 0; round < 4; round++) begin
      for (int i = 0; i < 4; i++) for (int k = 0; k < Q; k++) begin
        ra[i][k] = elem_t'($urandom); rb[i][k] = elem_t'($urandom);
      end
      for (int i = 0; i < 4; i++) for (int k = 0; k < Q; k++) begin
        wr_en = 1; wr_rel = 0; wr_tuple = 2'(i); wr_attr = 1'(k); wr_data = ra[i][k]; @(negedge clk);
        wr_en = 1; wr_rel = 1; wr_data = rb[i][k]; @(negedge clk);
      end
      wr_en = 0;
      run(OP_COMPARE);
      run(OP_INTERSECT);
      run(OP_DIFFERENCE);
    end
    // duplicate removal on the square instance
    begin
      int tl;
      tl = (4+1)*(4-1) + 4*(4-1) + 8*(4+3);
      @(negedge clk);
      start_d = 1;
      @(negedge clk);
      start_d = 0;
      for (int t = 0; t <= tl; t++) begin
        logic cin;
        elem_t bexp;
        cin = 1'b0;
        bexp = '0;
        for (int i = 1; i <= 4; i++) for (int j = i + 1; j <= 4; j++)
          if ((4+1)*(j-1) + 4*(4-i) == t) cin = 1'b1;
        check(to_arr_d.c == cin, $sformatf("dedup t=%0d Port-C %b want %b", t, to_arr_d.c, cin));
        for (int i = 1; i <= 4; i++) for (int j = 1; j <= Q; j++)
          if (4*(4+4-1) + 4*(j-1) + (i-1) == t) begin
            bexp = ra[i-1][j-1];
            check(to_arr_d.b == bexp, $sformatf("dedup t=%0d Port-B carries A", t));
          end
        @(negedge clk);
      end
      check(done_d == 1'b1, "dedup done");
    end
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
