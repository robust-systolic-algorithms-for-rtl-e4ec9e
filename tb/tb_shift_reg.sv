// Self-checking test of shift_reg: a random byte stream through a 3-stage and
// a 0-stage (wire) instance; q must equal d delayed by DEPTH cycles, and reset
// must load the reset value into every stage.
module tb_shift_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [7:0] d, q3, q0;
  logic [7:0] hist [$];

  shift_reg #(.T(logic [7:0]), .DEPTH(3), .RST_VAL(8'hA5)) dut3 (.clk, .rst, .d, .q (q3));
  shift_reg #(.T(logic [7:0]), .DEPTH(0)) dut0 (.clk, .rst, .d, .q (q0));

  initial begin
    d = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (q3 !== 8'hA5) begin failures++; $display("FAIL: reset value %h", q3); end
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      d = 8'($urandom);
      #1;
      checks++;
      if (q0 !== d) begin failures++; $display("FAIL: depth 0"); end
      hist.push_back(d);
      @(negedge clk);
      if (hist.size() > 3) void'(hist.pop_front());
      if (n >= 2) begin
        checks++;
        if (q3 !== hist[0]) begin failures++; $display("FAIL: depth 3 got %h want %h", q3, hist[0]); end
      end else if (n < 2) begin
        checks++;
        if (q3 !== 8'hA5) begin failures++; $display("FAIL: reset value not shifted out in order"); end
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
