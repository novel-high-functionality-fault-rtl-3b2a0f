// Shared types and operation encodings of the fault tolerant reversible ALU.
//
// ft_alu_sel_t bundles the fourteen select lines S0..S13 (bit i is Si). The
// ft_op_e enumeration names the forty operations the ALU performs: twelve
// logic functions, fourteen additions (set 1) and fourteen subtractions
// (set 2). op_select() returns the select word for an operation; the
// encodings are those of the ALU's operation tables, with every
// don't-care line driven to 0 (a choice of this design, any value works).
//
// In the arithmetic operations the second operand X is the value routed to
// the FTRA B input (0, B or ~B) and the third operand Y is the value
// produced by Fredkin gate 3 (for example A&~B). Set 1 computes A + X + Y
// (sum on func, carry on garbage line G18); set 2 computes A - X - Y
// (difference on func, borrow on garbage line G20).
package ft_alu_pkg;

  typedef struct packed {
    logic s13, s12, s11, s10, s9, s8, s7, s6, s5, s4, s3, s2, s1, s0;
  } ft_alu_sel_t;

  localparam int unsigned NumOps = 40;

  typedef enum logic [$clog2(NumOps)-1:0] {
    // Logic functions
    OP_XOR, OP_AND, OP_A_OR_NB, OP_XNOR, OP_NOR, OP_NA_OR_B,
    OP_OR, OP_A_AND_NB, OP_NAND, OP_NA_AND_B, OP_PASS_A, OP_NOT_A,
    // Set 1: A plus X plus Y
    ADD_A_ANB,   // A + A~B
    ADD_A_NB_AB, // A + ~B + AB
    ADD_A_B_ANB, // A + B + A~B
    ADD_A_B,     // A + B
    ADD_A_NB,    // A + ~B
    ADD_A_AB,    // A + AB
    ADD_A_NB_A,  // A + ~B + A
    ADD_A_B_A,   // A + B + A
    ADD_A_NAB,   // A + ~AB
    ADD_A_B_NAB, // A + B + ~AB
    ADD_A_NB_NAB,// A + ~B + ~AB
    ADD_A_AOB,   // A + (A|B)
    ADD_A_AONB,  // A + (A|~B)
    ADD_A_A,     // A + A
    // Set 2: A minus X minus Y (same operands as set 1)
    SUB_A_ANB, SUB_A_NB_AB, SUB_A_B_ANB, SUB_A_B, SUB_A_NB, SUB_A_AB,
    SUB_A_NB_A, SUB_A_B_A, SUB_A_NAB, SUB_A_B_NAB, SUB_A_NB_NAB,
    SUB_A_AOB, SUB_A_AONB, SUB_A_A
  } ft_op_e;

  localparam int unsigned FirstAdd = 12;
  localparam int unsigned FirstSub = 26;

  // Select word of an operation. Subtractions reuse the addition with the
  // same operands and set S9.
  function automatic ft_alu_sel_t op_select(ft_op_e op);
    ft_alu_sel_t s;
    ft_op_e      base;
    s = '0;
    base = op;
    if (op >= ft_op_e'(FirstSub)) begin
      base = ft_op_e'(op - 6'(FirstSub - FirstAdd));
      s.s9 = 1'b1;
    end
    case (base)
      OP_XOR:       begin s.s1 = 1'b1; s.s11 = 1'b1; end
      OP_AND:       begin s.s1 = 1'b1; s.s11 = 1'b1; s.s12 = 1'b1; end
      OP_A_OR_NB:   begin s.s1 = 1'b1; s.s11 = 1'b1; s.s13 = 1'b1; end
      OP_XNOR:      begin s.s1 = 1'b1; s.s10 = 1'b1; end
      OP_NOR:       begin s.s1 = 1'b1; s.s10 = 1'b1; s.s12 = 1'b1; end
      OP_NA_OR_B:   begin s.s1 = 1'b1; s.s10 = 1'b1; s.s13 = 1'b1; end
      OP_OR:        begin s.s1 = 1'b1; s.s5 = 1'b1; s.s8 = 1'b1; s.s12 = 1'b1; end
      OP_A_AND_NB:  begin s.s1 = 1'b1; s.s5 = 1'b1; s.s8 = 1'b1; s.s13 = 1'b1; end
      OP_NAND:      begin s.s1 = 1'b1; s.s5 = 1'b1; s.s8 = 1'b1; s.s10 = 1'b1; s.s11 = 1'b1; s.s12 = 1'b1; end
      OP_NA_AND_B:  begin s.s1 = 1'b1; s.s5 = 1'b1; s.s8 = 1'b1; s.s10 = 1'b1; s.s11 = 1'b1; s.s13 = 1'b1; end
      OP_PASS_A:    begin s.s11 = 1'b1; end
      OP_NOT_A:     begin s.s2 = 1'b1; s.s11 = 1'b1; end
      ADD_A_ANB:    begin s.s3 = 1'b1; s.s4 = 1'b1; s.s6 = 1'b1; s.s7 = 1'b1; end
      ADD_A_NB_AB:  begin s.s0 = 1'b1; s.s1 = 1'b1; s.s4 = 1'b1; s.s6 = 1'b1; s.s7 = 1'b1; end
      ADD_A_B_ANB:  begin s.s1 = 1'b1; s.s3 = 1'b1; s.s4 = 1'b1; s.s6 = 1'b1; s.s7 = 1'b1; end
      ADD_A_B:      begin s.s1 = 1'b1; end
      ADD_A_NB:     begin s.s0 = 1'b1; s.s1 = 1'b1; end
      ADD_A_AB:     begin s.s4 = 1'b1; s.s6 = 1'b1; s.s7 = 1'b1; end
      ADD_A_NB_A:   begin s.s0 = 1'b1; s.s1 = 1'b1; s.s8 = 1'b1; end
      ADD_A_B_A:    begin s.s1 = 1'b1; s.s8 = 1'b1; end
      ADD_A_NAB:    begin s.s4 = 1'b1; end
      ADD_A_B_NAB:  begin s.s1 = 1'b1; s.s4 = 1'b1; end
      ADD_A_NB_NAB: begin s.s0 = 1'b1; s.s1 = 1'b1; s.s4 = 1'b1; end
      ADD_A_AOB:    begin s.s4 = 1'b1; s.s8 = 1'b1; end
      ADD_A_AONB:   begin s.s3 = 1'b1; s.s4 = 1'b1; s.s8 = 1'b1; end
      ADD_A_A:      begin s.s8 = 1'b1; end
      default:      s = '0;
    endcase
    return s;
  endfunction

endpackage
