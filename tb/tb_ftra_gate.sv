// Self-checking testbench of the FTRA adder cell.
//
// Sweeps all 32 input vectors. Checks P and Q as pass-throughs, R as the
// parity of A..D, reversibility (all 32 output vectors differ), full-adder
// mode (C = carry-in, D = E = 0: R = sum, S = carry, from integer addition),
// full-subtractor mode (D = borrow-in, C = E = 0: R = difference, T =
// borrow, from integer subtraction), and the twelve logic functions the ALU
// takes from it for each constant setting of C, D and E.
module tb_ftra_gate;
  logic a, b, c, d, e, p, q, r, s, t;
  int   checks = 0, failures = 0;
  logic [31:0] seen;

  ftra_gate dut (.a(a), .b(b), .c(c), .d(d), .e(e), .p(p), .q(q), .r(r), .s(s), .t(t));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: abcde=%b%b%b%b%b -> pqrst=%b%b%b%b%b", what, a, b, c, d, e, p, q, r, s, t);
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
    int sum, diff;
    seen = '0;
    for (int v = 0; v < 32; v++) begin
      {a, b, c, d, e} = 5'(v);
      #1;
      check(p == a && q == b, "P = A, Q = B");
      check(r == ((int'(a) + int'(b) + int'(c) + int'(d)) % 2 == 1), "R = A^B^C^D");
      check(!seen[{p, q, r, s, t}], "output vector unique");
      seen[{p, q, r, s, t}] = 1'b1;
      if (!d && !e) begin
        sum = int'(a) + int'(b) + int'(c);
        check(r == sum[0] && s == sum[1], "full adder");
      end
      if (!c && !e) begin
        diff = int'(a) - int'(b) - int'(d);
        check(r == diff[0] && t == (diff < 0), "full subtractor");
      end
      case ({c, d, e})
        3'b001: begin
          check(r == (a != b), "XOR");
          check(s == (a && b), "AND");
          check(t == (a || !b), "A | ~B");
        end
        3'b010: begin
          check(r == (a == b), "XNOR");
          check(s == !(a || b), "NOR");
          check(t == (!a || b), "~A | B");
        end
        3'b100: begin
          check(s == (a || b), "OR");
          check(t == (a && !b), "A & ~B");
        end
        3'b111: begin
          check(s == !(a && b), "NAND");
          check(t == (!a && b), "~A & B");
        end
        default: ;
      endcase
      if (!b && {c, d, e} == 3'b001) check(r == a, "pass A");
      if (b && {c, d, e} == 3'b001) check(r == !a, "invert A");
    end
    check(&seen, "all output vectors reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
