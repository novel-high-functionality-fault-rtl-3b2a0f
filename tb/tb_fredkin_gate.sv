// Self-checking testbench of the Fredkin gate.
//
// Applies all eight input vectors and checks the outputs against the gate
// written as a controlled swap (A = 1 exchanges B and C), that it is
// conservative (same number of ones in and out), that it is reversible, and
// the two uses the ALU makes of it: 2:1 multiplexer on Q, and ~A&B / A|B on
// Q when C is the mode bit.
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;
  logic [7:0] seen;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
      if (a) check({q, r} == {c, b}, "swap when A = 1");
      else   check({q, r} == {b, c}, "pass when A = 0");
      check(int'(p) + int'(q) + int'(r) == int'(a) + int'(b) + int'(c), "conservative");
      check(!seen[{p, q, r}], "output vector unique");
      seen[{p, q, r}] = 1'b1;
      // AND / OR cell use: C is the mode bit
      if (!c) check(q == (!a && b), "Q = ~A & B when C = 0");
      else    check(q == (a || b), "Q = A | B when C = 1");
    end
    check(&seen, "all output vectors reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
