// Self-checking test of systolic_array (N = 7 processors, K = 5).
//
// The testbench plays the host: it builds the Port-A/B/C/X streams of the
// comparison and intersection algorithms for p = 4, q = 2, r = 3 directly
// from the published timing formulas (loops over i and j) and drives two
// arrays with different link layouts: the default 1,1,1,4,2,1,1,3 and
// 2,2,2,2,2,2,1,1. At the extraction times it checks c_ij^final and x_i^final
// against a reference computed from the relations, and it checks that both
// arrays produce the same port output in every cycle. It also follows the
// trace of c_41 in the default array: c_41 must meet a_41 and b_11 at
// processor 6 and a_42 and b_12 at processor 7. In this design a value pumped
// in cycle t is captured by the input link at the end of that cycle, so
// internal positions are one cycle later than in a trace that counts the input
// link as holding the value during the pump cycle.
module tb_systolic_array;
  import rdb_pkg::*;
  localparam int p = 4, q = 2, r = 3, N = p + q + r - 2, K = p + 1;
  localparam int TEND = (p + 1) * (r - 1) + p * (p - 1) + N * (p + 3) + 2;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  lane_t pin, pout_a, pout_b;
  systolic_array dut_a (.clk, .rst, .port_i (pin), .port_o (pout_a));
  systolic_array #(.N(N), .K(K), .LINK_LEN({8'd2, 8'd2, 8'd2, 8'd2, 8'd2, 8'd2, 8'd1, 8'd1})) dut_b (
    .clk, .rst, .port_i (pin), .port_o (pout_b));

  elem_t ra [p][q];
  elem_t rb [r][q];
  lane_t sched [TEND + 1];
  int    c_out_i [TEND + 1], c_out_j [TEND + 1], x_out_i [TEND + 1];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic eq_ab(int i, int j);
    for (int k = 0; k < q; k++) if (ra[i][k] != rb[j][k]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic build();
    for (int t = 0; t <= TEND; t++) begin
      sched[t] = '{a: '{wc: 1'b1, val: '0}, b: '0, c: 1'b0, x: 1'b0};
      c_out_i[t] = -1; c_out_j[t] = -1; x_out_i[t] = -1;
    end
    for (int i = 1; i <= p; i++)             // step 2 and step 6
      for (int j = 1; j <= r; j++) begin
        sched[(p+1)*(j-1) + p*(p-i)].c = 1'b1;
        c_out_i[(p+1)*(j-1) + p*(p-i) + N*(p+3)] = i;
        c_out_j[(p+1)*(j-1) + p*(p-i) + N*(p+3)] = j;
      end
    for (int i = 1; i <= p; i++)             // step 3
      for (int j = 1; j <= q; j++)
        sched[(p+1)*r + p*(p-1) + (p+1)*(j-1) + (i-1)].a = '{wc: 1'b0, val: ra[i-1][j-1]};
    for (int i = 1; i <= r; i++)             // step 4
      for (int j = 1; j <= q; j++)
        sched[p*(p+r-1) + p*(j-1) + (i-1)].b = rb[i-1][j-1];
    for (int i = 1; i <= p; i++)             // steps 7 and 8 (x_i^0 = False)
      x_out_i[(p+3)*N - (p-i)] = i;
  endtask

  initial begin
    pin = '{a: '{wc: 1'b1, val: '0}, b: '0, c: 1'b0, x: 1'b0};
    repeat (3) @(negedge clk);
    rst = 0;
    for (int round = 0; round < 20; round++) begin
      int tr;
      for (int i = 0; i < p; i++) for (int k = 0; k < q; k++) ra[i][k] = elem_t'($urandom_range(1));
      for (int j = 0; j < r; j++) for (int k = 0; k < q; k++) rb[j][k] = elem_t'($urandom_range(1));
      build();
      for (int t = 0; t <= TEND; t++) begin
        @(negedge clk);
        pin = sched[t];
        #1;
        check(pout_a == pout_b, $sformatf("round %0d t=%0d: the two link layouts differ at the port", round, t));
        if (c_out_i[t] > 0) begin
          int i, j;
          i = c_out_i[t]; j = c_out_j[t];
          check(pout_a.c == eq_ab(i-1, j-1), $sformatf("t=%0d c_%0d%0d=%0b ref %0b", t, i, j, pout_a.c, eq_ab(i-1, j-1)));
        end
        if (x_out_i[t] > 0) begin
          logic xr;
          xr = 1'b0;
          for (int j = 0; j < r; j++) xr |= eq_ab(x_out_i[t]-1, j);
          check(pout_a.x == xr, $sformatf("t=%0d x_%0d=%0b ref %0b", t, x_out_i[t], pout_a.x, xr));
        end
        // trace of c_41: (paper time) 39 at P_6, 45 at P_7; +1 here
        if (t == 40) begin
          tr = 1;
          check(dut_a.g_stage[5].u_proc.pe_in.c == 1'b1 &&
                dut_a.g_stage[5].u_proc.pe_in.a == '{wc: 1'b0, val: ra[3][0]} &&
                dut_a.g_stage[5].u_proc.pe_in.b == rb[0][0], "c_41 meets a_41 and b_11 at P_6");
        end
        if (t == 46)
          check(dut_a.g_stage[6].u_proc.pe_in.c == (ra[3][0] == rb[0][0]) &&
                dut_a.g_stage[6].u_proc.pe_in.a == '{wc: 1'b0, val: ra[3][1]} &&
                dut_a.g_stage[6].u_proc.pe_in.b == rb[0][1], "c_41 meets a_42 and b_12 at P_7");
      end
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
