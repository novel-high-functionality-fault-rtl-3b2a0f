// Self-checking testbench of the Double Feynman gate.
//
// Applies all eight input vectors and checks each output against the
// gate's definition written as controlled inversions (A selects B or ~B on
// Q and C or ~C on R), that the gate preserves parity, and that the eight
// output vectors are all different (the gate is reversible).
module tb_double_feynman_gate;
  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;
  logic [7:0] seen;

  double_feynman_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%b b=%b c=%b -> p=%b q=%b r=%b", what, a, b, c, p, q, r);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check(p == a, "P copies A");
      check(q == (a ? !b : b), "Q is B inverted under A");
      check(r == (a ? !c : c), "R is C inverted under A");
      check((p + q + r) % 2 == (a + b + c) % 2, "parity preserved");
      check(!seen[{p, q, r}], "output vector unique");
      seen[{p, q, r}] = 1'b1;
    end
    check(&seen, "all output vectors reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
