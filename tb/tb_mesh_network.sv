// Self-checking test of mesh_network (3 x 3, K = 5).
//
// Three configured machines receive the same random port stream after reset:
//   mesh_x : the example configuration (faulty (1,0) and (1,2))
//   mesh_d : a depth-first tour of a different fault pattern ((0,1), (2,2))
//   ref    : systolic_array with the example's link counts 1,1,1,4,2,1,1,3
// All three have seven processors and must give identical port output in
// every cycle, which is the claim that the I/O behaviour does not depend on
// the fault pattern. The example configuration is also checked link by link:
// a marker entering Port-A must reach P_4's input after 6 link cycles and the
// output after 14.
module tb_mesh_network;
  import rdb_pkg::*;
  import tb_mesh_cfg_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  cfg_t cfg_x, cfg_d;
  lane_t pin, out_x, out_d, out_r;

  mesh_network mesh_x (.clk, .rst, .cfg (cfg_x), .port_i (pin), .port_o (out_x));
  mesh_network mesh_d (.clk, .rst, .cfg (cfg_d), .port_i (pin), .port_o (out_d));
  systolic_array ref_arr (.clk, .rst, .port_i (pin), .port_o (out_r));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    tour_builder tb_b;
    fault_t f;
    tb_b = new();
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) f[r][c] = 0;
    f[0][1] = 1; f[2][2] = 1;
    tb_b.build(f);
    cfg_d = tb_b.cfg;
    cfg_x = example_cfg();
    check(tb_b.nproc == 7, $sformatf("depth-first tour has %0d processors", tb_b.nproc));
    pin = LANE_IDLE;
    repeat (3) @(negedge clk);
    rst = 0;
    // marker: a single non-wild-card A value, checked at P_4 (mesh module (0,2))
    pin.a = '{wc: 1'b0, val: 8'hC3};
    @(negedge clk);
    pin = LANE_IDLE;
    for (int t = 1; t <= 20; t++) begin
      #1;
      if (t == 7) check(mesh_x.g_row[0].g_col[2].u_mod.proc_in.a == '{wc: 1'b0, val: 8'hC3},
                        "marker reaches P_4 after c_1 .. c_7");
      if (t == 14) check(out_x.a == '{wc: 1'b0, val: 8'hC3}, "marker leaves after 2N = 14 links");
      @(negedge clk);
    end
    // random streams
    for (int n = 0; n < 3000; n++) begin
      pin.a.wc  = ($urandom_range(3) == 0);
      pin.a.val = elem_t'($urandom_range(2));
      pin.b     = elem_t'($urandom_range(2));
      pin.c     = 1'($urandom);
      pin.x     = ($urandom_range(3) == 0);
      #1;
      check(out_x == out_r, $sformatf("n=%0d example mesh %h, pipeline %h", n, out_x, out_r));
      check(out_d == out_r, $sformatf("n=%0d other fault pattern %h, pipeline %h", n, out_d, out_r));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
