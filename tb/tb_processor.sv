// Self-checking test of processor with K = 5: drives random lanes and checks
// that the output is the PE function of the A and X inputs of this cycle, the
// B input of the previous cycle (buffer B_i) and the C input of 5 cycles ago
// (buffer C_i[1..5]). After reset the C buffer must read False.
module tb_processor;
  import rdb_pkg::*;
  localparam int K = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  lane_t in_l, out_l;
  lane_t hist [$];

  processor #(.K(K)) dut (.clk, .rst, .in_i (in_l), .out_o (out_l));

  initial begin
    lane_t e;
    logic eq, cdel;
    elem_t bdel;
    in_l = LANE_IDLE;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      in_l.a.wc  = ($urandom_range(5) == 0);
      in_l.a.val = elem_t'($urandom_range(2));
      in_l.b     = elem_t'($urandom_range(2));
      in_l.c     = ($urandom_range(2) != 0);
      in_l.x     = ($urandom_range(3) == 0);
      hist.push_front(in_l);   // hist[0] = now, hist[k] = k cycles ago
      #1;
      cdel = (hist.size() > K) ? hist[K].c : 1'b0;
      if (hist.size() > 1) bdel = hist[1].b; else bdel = '0;
      if (n >= 1) begin
        eq = in_l.a.wc || (in_l.a.val == bdel);
        e.a = in_l.a; e.b = bdel; e.c = cdel && eq; e.x = in_l.x || (cdel && eq);
        checks++;
        if (out_l !== e) begin
          failures++;
          $display("FAIL: n=%0d out=%h expected=%h", n, out_l, e);
        end
      end
      if (hist.size() > K + 1) void'(hist.pop_back());
      @(negedge clk);
    end
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
