// Self-checking test of the processing element: random and directed inputs,
// outputs compared with the PE equations evaluated here.
module tb_pe;
  import rdb_pkg::*;

  int checks = 0, failures = 0;
  lane_t in_l, out_l;

  pe dut (.in_i (in_l), .out_o (out_l));

  task automatic apply_and_check();
    logic eq;
    #1;
    eq = in_l.a.wc ? 1'b1 : (in_l.a.val == in_l.b);
    checks++;
    if (out_l.a !== in_l.a || out_l.b !== in_l.b || out_l.c !== (in_l.c & eq) ||
        out_l.x !== (in_l.x | (in_l.c & eq))) begin
      failures++;
      $display("FAIL: in a=%0b/%0h b=%0h c=%0b x=%0b -> out c=%0b x=%0b", in_l.a.wc, in_l.a.val,
               in_l.b, in_l.c, in_l.x, out_l.c, out_l.x);
    end
  endtask

  initial begin
    // directed: equal, unequal, wild card, with every c / x combination
    for (int v = 0; v < 16; v++) begin
      in_l.c = v[0]; in_l.x = v[1]; in_l.a.wc = v[2];
      in_l.b = 8'h5a;
      in_l.a.val = v[3] ? 8'h5a : 8'h5b;
      apply_and_check();
    end
    // random, small alphabet so that equality is common
    for (int n = 0; n < 2000; n++) begin
      in_l.a.wc  = ($urandom_range(7) == 0);
      in_l.a.val = elem_t'($urandom_range(3));
      in_l.b     = elem_t'($urandom_range(3));
      in_l.c     = 1'($urandom);
      in_l.x     = 1'($urandom);
      apply_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
