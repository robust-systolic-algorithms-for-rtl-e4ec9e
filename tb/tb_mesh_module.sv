// Self-checking test of mesh_module (K = 5).
//
// Module u_a is routed as a pass-through-and-process module: its processor
// takes the link from the west and sends its result east, the link from the
// south is passed north, the link from the north goes to the host output and
// the south output is unused. Module u_b is an I/O module whose processor
// takes the host input. Each routed output must equal its source one cycle
// later (one link register); processor outputs are compared with a reference
// processor fed the same stream (through the same one-cycle input register
// for the host input); unused outputs must stay idle.
module tb_mesh_module;
  import rdb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  module_cfg_t cfg_a, cfg_b;
  lane_t in_l [4];
  lane_t out_a [4], out_b [4];
  lane_t io_in, io_out_a, io_out_b;
  lane_t ref_a_out, ref_b_out, io_in_q;
  lane_t idle_in [4];

  mesh_module u_a (.clk, .rst, .cfg (cfg_a), .in_link (in_l), .out_link (out_a), .io_in, .io_out (io_out_a));
  mesh_module u_b (.clk, .rst, .cfg (cfg_b), .in_link (idle_in), .out_link (out_b), .io_in, .io_out (io_out_b));

  processor ref_a (.clk, .rst, .in_i (in_l[DIR_W]), .out_o (ref_a_out));
  always_ff @(posedge clk) io_in_q <= rst ? LANE_IDLE : io_in;
  processor ref_b (.clk, .rst, .in_i (io_in_q), .out_o (ref_b_out));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic lane_t rnd();
    lane_t l;
    l.a.wc  = ($urandom_range(3) == 0);
    l.a.val = elem_t'($urandom_range(2));
    l.b     = elem_t'($urandom_range(2));
    l.c     = 1'($urandom);
    l.x     = ($urandom_range(3) == 0);
    return l;
  endfunction

  initial begin
    lane_t exp_e, exp_n, exp_io, exp_be, exp_bio;
    cfg_a = CFG_UNUSED;
    cfg_a.proc_en = 1; cfg_a.proc_src = SRC_W;
    cfg_a.out_src[DIR_E] = SRC_PROC; cfg_a.out_src[DIR_N] = SRC_S; cfg_a.io_src = SRC_N;
    cfg_b = CFG_UNUSED;
    cfg_b.proc_en = 1; cfg_b.proc_src = SRC_IO;
    cfg_b.out_src[DIR_E] = SRC_PROC; cfg_b.io_src = SRC_PROC;
    for (int d = 0; d < 4; d++) begin in_l[d] = LANE_IDLE; idle_in[d] = LANE_IDLE; end
    io_in = LANE_IDLE;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 1500; n++) begin
      for (int d = 0; d < 4; d++) in_l[d] = rnd();
      io_in = rnd();
      #1;
      exp_e = ref_a_out; exp_n = in_l[DIR_S]; exp_io = in_l[DIR_N];
      exp_be = ref_b_out; exp_bio = ref_b_out;
      @(negedge clk);
      check(out_a[DIR_E] == exp_e, $sformatf("n=%0d processor output east", n));
      check(out_a[DIR_N] == exp_n, $sformatf("n=%0d south passed north", n));
      check(io_out_a == exp_io, $sformatf("n=%0d north passed to host output", n));
      check(out_a[DIR_S] == LANE_IDLE && out_a[DIR_W] == LANE_IDLE, "unused outputs idle");
      check(out_b[DIR_E] == exp_be && io_out_b == exp_bio, $sformatf("n=%0d I/O module processor", n));
      check(out_b[DIR_N] == LANE_IDLE, "I/O module north idle");
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
