// End-to-end self-checking testbench of the one-bit fault tolerant ALU.
//
// For each of the forty operations and each of the four (A, B) pairs it
// applies the select word from ft_alu_pkg::op_select() and compares the
// result with a value worked out here from the operation's meaning alone:
// the logic function itself, or the integer sum A + X + Y (set 1) or
// difference A - X - Y (set 2) of the operation's operands. Sum and
// difference bits are checked on func, carry on G18 and borrow on G20. The
// garbage lines that are plain copies of inputs are checked too, and so is
// parity preservation of every Fredkin and Double Feynman gate instance. Each
// vector is then repeated 8 times with its don't-care select lines set at
// random, to show those lines really do not matter. Finally the vector
// shown at the cursor of the published simulation waveform is applied and
// every value printed there is compared.
//
// The mechanisms of the datapath are counted and each must occur: every
// operation, a carry out, a borrow out, Fredkin gate 3 in AND and in OR
// mode, Fredkin gate 4 routing to the adder (C) and to the subtractor (D)
// input, and each of the result lines F1, F2 and F3 selected onto func.
// The top runs with its default (and only) configuration.
module tb_ft_alu;
  import ft_alu_pkg::*;

  logic        a, b, func;
  ft_alu_sel_t sel;
  logic [20:1] g;
  int          checks = 0, failures = 0;

  int op_hits[NumOps];
  int n_carry = 0, n_borrow = 0, n_and_mode = 0, n_or_mode = 0;
  int n_to_c = 0, n_to_d = 0, n_sel_f1 = 0, n_sel_f2 = 0, n_sel_f3 = 0;

  ft_alu dut (.a(a), .b(b), .sel(sel), .func(func), .g(g));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%b b=%b sel=%b -> func=%b g=%b", what, a, b, sel, func, g);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Select lines that the operation tables leave as don't-care, plus S7,
  // which only drives a garbage line.
  function automatic ft_alu_sel_t dont_care(ft_op_e op);
    ft_alu_sel_t m;
    int          k;
    m = '0;
    m.s7 = (op < ft_op_e'(FirstAdd));
    if (op < ft_op_e'(FirstAdd)) begin
      m.s3 = 1'b1;
      if (op inside {OP_A_OR_NB, OP_NA_OR_B, OP_A_AND_NB, OP_NA_AND_B}) m.s12 = 1'b1;
      if (op inside {OP_PASS_A, OP_NOT_A}) m.s0 = 1'b1;
      else m.s2 = 1'b1;
    end else begin
      k = (op >= ft_op_e'(FirstSub)) ? int'(op) - FirstSub : int'(op) - FirstAdd;
      case (k)
        0, 5, 8, 11, 12, 13: m.s0 = 1'b1;
        default:             m.s2 = 1'b1;
      endcase
      if (k inside {3, 4, 6, 7, 13}) m.s3 = 1'b1;
      if (k inside {0, 1, 2, 5, 8, 9, 10, 11, 12}) m.s5 = 1'b1;
    end
    return m;
  endfunction

  // Operands X (on the FTRA B input) and Y (from Fredkin gate 3) of the
  // k-th arithmetic operation, from its written form A +/- X +/- Y.
  task automatic operands(input int k, input logic av, bv, output logic x, y);
    case (k)
      0:  begin x = 0;   y = av & !bv;  end // A + A~B
      1:  begin x = !bv; y = av & bv;   end // A + ~B + AB
      2:  begin x = bv;  y = av & !bv;  end // A + B + A~B
      3:  begin x = bv;  y = 0;         end // A + B
      4:  begin x = !bv; y = 0;         end // A + ~B
      5:  begin x = 0;   y = av & bv;   end // A + AB
      6:  begin x = !bv; y = av;        end // A + ~B + A
      7:  begin x = bv;  y = av;        end // A + B + A
      8:  begin x = 0;   y = !av & bv;  end // A + ~AB
      9:  begin x = bv;  y = !av & bv;  end // A + B + ~AB
      10: begin x = !bv; y = !av & bv;  end // A + ~B + ~AB
      11: begin x = 0;   y = av | bv;   end // A + (A|B)
      12: begin x = 0;   y = av | !bv;  end // A + (A|~B)
      default: begin x = 0; y = av;     end // A + A
    endcase
  endtask

  function automatic logic logic_result(ft_op_e op, logic av, bv);
    case (op)
      OP_XOR:      return av ^ bv;
      OP_AND:      return av & bv;
      OP_A_OR_NB:  return av | !bv;
      OP_XNOR:     return !(av ^ bv);
      OP_NOR:      return !(av | bv);
      OP_NA_OR_B:  return !av | bv;
      OP_OR:       return av | bv;
      OP_A_AND_NB: return av & !bv;
      OP_NAND:     return !(av & bv);
      OP_NA_AND_B: return !av & bv;
      OP_PASS_A:   return av;
      default:     return !av;
    endcase
  endfunction

  // Parity of inputs and outputs of the ten Fredkin and Double Feynman
  // gates inside the ALU, observed through the hierarchy.
  function automatic logic [9:0] gate_parity_ok();
    return {
      (dut.u_dfg1.a ^ dut.u_dfg1.b ^ dut.u_dfg1.c) == (dut.u_dfg1.p ^ dut.u_dfg1.q ^ dut.u_dfg1.r),
      (dut.u_dfg2.a ^ dut.u_dfg2.b ^ dut.u_dfg2.c) == (dut.u_dfg2.p ^ dut.u_dfg2.q ^ dut.u_dfg2.r),
      (dut.u_dfg3.a ^ dut.u_dfg3.b ^ dut.u_dfg3.c) == (dut.u_dfg3.p ^ dut.u_dfg3.q ^ dut.u_dfg3.r),
      (dut.u_dfg4.a ^ dut.u_dfg4.b ^ dut.u_dfg4.c) == (dut.u_dfg4.p ^ dut.u_dfg4.q ^ dut.u_dfg4.r),
      (dut.u_fg1.a ^ dut.u_fg1.b ^ dut.u_fg1.c) == (dut.u_fg1.p ^ dut.u_fg1.q ^ dut.u_fg1.r),
      (dut.u_fg2.a ^ dut.u_fg2.b ^ dut.u_fg2.c) == (dut.u_fg2.p ^ dut.u_fg2.q ^ dut.u_fg2.r),
      (dut.u_fg3.a ^ dut.u_fg3.b ^ dut.u_fg3.c) == (dut.u_fg3.p ^ dut.u_fg3.q ^ dut.u_fg3.r),
      (dut.u_fg4.a ^ dut.u_fg4.b ^ dut.u_fg4.c) == (dut.u_fg4.p ^ dut.u_fg4.q ^ dut.u_fg4.r),
      (dut.u_fg5.a ^ dut.u_fg5.b ^ dut.u_fg5.c) == (dut.u_fg5.p ^ dut.u_fg5.q ^ dut.u_fg5.r),
      (dut.u_fg6.a ^ dut.u_fg6.b ^ dut.u_fg6.c) == (dut.u_fg6.p ^ dut.u_fg6.q ^ dut.u_fg6.r)};
  endfunction

  task automatic check_vector(input ft_op_e op, input string tag);
    logic x, y;
    int   k, res;
    check(&gate_parity_ok(), {tag, " parity preserved by every Fredkin and Double Feynman gate"});
    check(g[1] == sel.s0 && g[2] == sel.s0, {tag, " G1/G2 copy S0"});
    check(g[3] == sel.s1 && g[7] == sel.s4 && g[14] == sel.s9, {tag, " Fredkin controls on G3/G7/G14"});
    check(g[5] == sel.s3 && g[6] == sel.s3, {tag, " G5/G6 copy S3"});
    check(g[9] == (a ^ sel.s7) && g[10] == (a ^ sel.s6), {tag, " G9/G10"});
    check(g[12] == sel.s8 && g[13] == sel.s8, {tag, " G12/G13 copy S8"});
    check(g[15] == a && g[17] == sel.s12 && g[19] == sel.s13, {tag, " G15/G17/G19"});
    if (op < ft_op_e'(FirstAdd)) begin
      check(func == logic_result(op, a, b), {tag, " logic result"});
    end else if (op < ft_op_e'(FirstSub)) begin
      k = int'(op) - FirstAdd;
      operands(k, a, b, x, y);
      res = int'(a) + int'(x) + int'(y);
      check(g[16] == x, {tag, " FTRA B operand"});
      check(func == res[0], {tag, " sum"});
      check(g[18] == res[1], {tag, " carry on G18"});
    end else begin
      k = int'(op) - FirstSub;
      operands(k, a, b, x, y);
      res = int'(a) - int'(x) - int'(y);
      check(g[16] == x, {tag, " FTRA B operand"});
      check(func == res[0], {tag, " difference"});
      check(g[20] == (res < 0), {tag, " borrow on G20"});
    end
  endtask

  initial begin
    ft_alu_sel_t base, mask;
    logic x, y;
    int   k, res;
    foreach (op_hits[i]) op_hits[i] = 0;
    a = 0; b = 0; sel = '0;

    for (int o = 0; o < NumOps; o++) begin
      ft_op_e op;
      op   = ft_op_e'(o);
      base = op_select(op);
      mask = dont_care(op);
      for (int v = 0; v < 4; v++) begin
        {a, b} = 2'(v);
        sel = base;
        #1;
        check_vector(op, op.name());
        op_hits[o]++;
        // mechanism counters
        if (op >= ft_op_e'(FirstAdd)) begin
          k = (op >= ft_op_e'(FirstSub)) ? int'(op) - FirstSub : int'(op) - FirstAdd;
          operands(k, a, b, x, y);
          if (op < ft_op_e'(FirstSub)) begin
            res = int'(a) + int'(x) + int'(y);
            if (res > 1) n_carry++;
          end else begin
            res = int'(a) - int'(x) - int'(y);
            if (res < 0) n_borrow++;
          end
        end
        if (sel.s8) n_or_mode++; else n_and_mode++;
        if (sel.s9) n_to_d++; else n_to_c++;
        if (sel.s13) n_sel_f3++;
        else if (sel.s12) n_sel_f2++;
        else n_sel_f1++;
        // don't-care select lines at random
        for (int rr = 0; rr < 8; rr++) begin
          sel = ft_alu_sel_t'((base & ~mask) | (ft_alu_sel_t'($urandom) & mask));
          #1;
          check_vector(op, {op.name(), " (random don't-cares)"});
        end
      end
    end

    // Vector at the cursor of the published waveform (A + ~B + ~AB with
    // A = 0, B = 0): func = 1 and the printed garbage values.
    a = 0; b = 0;
    sel = '0;
    sel.s0 = 1'b1; sel.s1 = 1'b1; sel.s4 = 1'b1;
    #1;
    check(func == 1'b1, "waveform cursor: func");
    check(g[19:10] == 10'b0001000000, "waveform cursor: G10..G19");

    foreach (op_hits[i]) begin
      checks++;
      if (op_hits[i] == 0) begin
        failures++;
        $display("FAIL operation %0d never exercised", i);
      end
    end
    $display("mechanisms: carry=%0d borrow=%0d and_mode=%0d or_mode=%0d to_c=%0d to_d=%0d f1=%0d f2=%0d f3=%0d",
             n_carry, n_borrow, n_and_mode, n_or_mode, n_to_c, n_to_d, n_sel_f1, n_sel_f2, n_sel_f3);
    checks++;
    if (n_carry == 0 || n_borrow == 0 || n_and_mode == 0 || n_or_mode == 0 ||
        n_to_c == 0 || n_to_d == 0 || n_sel_f1 == 0 || n_sel_f2 == 0 || n_sel_f3 == 0) begin
      failures++;
      $display("FAIL a datapath mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
