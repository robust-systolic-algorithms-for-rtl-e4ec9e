// Self-checking test of link: a random lane stream through a chain of 4 links;
// all four paths must come out 4 cycles later, and after reset the chain must
// hold the idle lane (wild card on A, False on C and X).
module tb_link;
  import rdb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  lane_t d, q;
  lane_t hist [$];

  link #(.LEN(4)) dut (.clk, .rst, .d, .q);

  initial begin
    d = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 400; n++) begin
      if (n < 4) begin
        checks++;
        if (q.a.wc !== 1'b1 || q.c !== 1'b0 || q.x !== 1'b0) begin
          failures++; $display("FAIL: chain not idle after reset");
        end
      end
      d = lane_t'({$urandom, $urandom});
      hist.push_back(d);
      @(negedge clk);
      if (n >= 3) begin
        checks++;
        if (q !== hist[0]) begin failures++; $display("FAIL: n=%0d got %h want %h", n, q, hist[0]); end
        void'(hist.pop_front());
      end
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
