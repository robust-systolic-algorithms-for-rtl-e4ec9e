// Full-size run of relational_engine at its default parameters (the
// example: P=4, Q=2, R=3 on seven processors of the 3 x 3 mesh, routed around
// the faulty modules (1,0) and (1,2) as in the example machine). Loads the relations of a fixed example in which a_2 = b_3
// and a_4 = b_1, runs comparison, intersection and difference, and checks the
// whole matrix [C], the vector X and the latency of each operation.
module tb_relational_engine_full;
  import rdb_pkg::*;
  import tb_mesh_cfg_pkg::*;
  localparam int P = 4, Q = 2, R = 3, N = P + Q + R - 2;
  // negedges from the start pulse until done is seen
  localparam int T = (P+1)*(R-1) + P*(P-1) + N*(P+3) + 2;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic wr_en = 0, wr_rel = 0, start = 0;
  logic [1:0] wr_tuple = 0;
  logic [0:0] wr_attr = 0;
  elem_t wr_data = 0;
  op_e op = OP_COMPARE;
  logic busy, done;
  logic c_mat [P][R];
  logic x_vec [P];

  cfg_t cfg;
  relational_engine dut (.clk, .rst, .cfg, .wr_en, .wr_rel, .wr_tuple, .wr_attr, .wr_data, .op, .start,
                         .busy, .done, .c_mat, .x_vec);

  // A = {<1,2>, <3,4>, <5,6>, <7,8>}, B = {<7,8>, <7,2>, <3,4>}
  localparam elem_t RA [P][Q] = '{'{8'd1, 8'd2}, '{8'd3, 8'd4}, '{8'd5, 8'd6}, '{8'd7, 8'd8}};
  localparam elem_t RB [R][Q] = '{'{8'd7, 8'd8}, '{8'd7, 8'd2}, '{8'd3, 8'd4}};
  // expected [C] and X, worked out by hand
  localparam logic CREF [P][R] = '{'{0, 0, 0}, '{0, 0, 1}, '{0, 0, 0}, '{1, 0, 0}};
  localparam logic XREF [P]    = '{0, 1, 0, 1};

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input op_e o);
    int cyc;
    @(negedge clk);
    op = o; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 10 * T) begin @(negedge clk); cyc++; end
    check(cyc == T, $sformatf("%s latency %0d want %0d", o.name(), cyc, T));
    for (int i = 0; i < P; i++) begin
      for (int j = 0; j < R; j++)
        check(c_mat[i][j] == CREF[i][j], $sformatf("%s c_%0d%0d", o.name(), i+1, j+1));
      check(x_vec[i] == (XREF[i] ^ (o == OP_DIFFERENCE)), $sformatf("%s x_%0d", o.name(), i+1));
    end
  endtask

  initial begin
    cfg = example_cfg();
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < P; i++) for (int k = 0; k < Q; k++) begin
      wr_en = 1; wr_rel = 0; wr_tuple = 2'(i); wr_attr = 1'(k); wr_data = RA[i][k]; @(negedge clk);
    end
    for (int j = 0; j < R; j++) for (int k = 0; k < Q; k++) begin
      wr_en = 1; wr_rel = 1; wr_tuple = 2'(j); wr_attr = 1'(k); wr_data = RB[j][k]; @(negedge clk);
    end
    wr_en = 0;
    run(OP_COMPARE);
    run(OP_INTERSECT);
    run(OP_DIFFERENCE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
