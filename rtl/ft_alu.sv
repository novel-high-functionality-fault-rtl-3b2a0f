// One-bit fault tolerant reversible ALU: forty operations from eleven
// reversible gates.
//
// The datapath is a fixed network of four Double Feynman gates (DFG), six
// Fredkin gates (FG) and one FTRA adder cell, steered by fourteen select
// lines S0..S13:
//   DFG1 (S0, B, 0)   -> T1 = B ^ S0          (B or ~B)
//   FG1  (S1, S2, T1) -> T2 = S1 ? T1 : S2    (0, 1, B or ~B; FTRA input B)
//   DFG2 (S3, B, 0)   -> T3 = B ^ S3          (B or ~B)
//   FG2  (S4, S5, T3) -> T4 = S4 ? T3 : S5    (0, 1, B or ~B)
//   DFG3 (A, S6, S7)  -> T5 = A, T6 = A ^ S6  (A, and A or ~A)
//   DFG4 (S8, 0, 0)   -> T7 = S8              (copy of the AND/OR mode bit)
//   FG3  (T6, T4, T7) -> T8 = T7 ? T6|T4 : ~T6&T4
//   FG4  (S9, T8, S10)-> S9 = 0: C = T8, D = S10 (addition, logic)
//                        S9 = 1: C = S10, D = T8 (subtraction)
//   FTRA (T5, T2, T9, T10, S11) -> F1 = R, F2 = S, F3 = T
//   FG5  (S12, F1, F2)-> func1 = S12 ? F2 : F1
//   FG6  (S13, func1, F3) -> func = S13 ? F3 : func1
// Every gate output that is not passed on is a garbage line G1..G20, in the
// order (top to bottom) of each gate's unused outputs. The only constant
// (ancillary) inputs are the four zeros on DFG1, DFG2 and DFG4.
//
// Arithmetic: with S9 = S10..S13 = 0 the result is the sum bit of
// A + T2 + T8 on func and the carry appears on G18 (FG5's third output,
// which carries F2 while S12 = 0). With S9 = 1 the result is the difference
// bit of A - T2 - T8 and the borrow appears on G20 (FG6's third output,
// which carries F3 while S13 = 0). ft_alu_pkg::op_select() gives the select
// word of every operation.
//
// The gate network, the select-line roles and the operation tables follow
// the published architecture; the FTRA carry equation and the use of G18 and
// G20 as carry and borrow outputs are this design's reading of it.
//
// Interface: inputs a, b and the select word sel; outputs func and the
// garbage vector g[20:1]. Purely combinational: no clock, no reset, no
// state; the result is valid one gate-network delay after the inputs.
module ft_alu
  import ft_alu_pkg::*;
(
  input  logic        a,
  input  logic        b,
  input  ft_alu_sel_t sel,
  output logic        func,
  output logic [20:1] g
);
  logic t1, t2, t3, t4, t5, t6, t7, t8, t9, t10;
  logic f1, f2, f3, func1;

  double_feynman_gate u_dfg1 (.a(sel.s0), .b(b),      .c(1'b0),  .p(g[1]),  .q(t1),    .r(g[2]));
  fredkin_gate        u_fg1  (.a(sel.s1), .b(sel.s2), .c(t1),    .p(g[3]),  .q(t2),    .r(g[4]));
  double_feynman_gate u_dfg2 (.a(sel.s3), .b(b),      .c(1'b0),  .p(g[5]),  .q(t3),    .r(g[6]));
  fredkin_gate        u_fg2  (.a(sel.s4), .b(sel.s5), .c(t3),    .p(g[7]),  .q(t4),    .r(g[8]));
  double_feynman_gate u_dfg3 (.a(a),      .b(sel.s6), .c(sel.s7),.p(t5),    .q(t6),    .r(g[9]));
  double_feynman_gate u_dfg4 (.a(sel.s8), .b(1'b0),   .c(1'b0),  .p(g[12]), .q(t7),    .r(g[13]));
  fredkin_gate        u_fg3  (.a(t6),     .b(t4),     .c(t7),    .p(g[10]), .q(t8),    .r(g[11]));
  fredkin_gate        u_fg4  (.a(sel.s9), .b(t8),     .c(sel.s10),.p(g[14]),.q(t9),    .r(t10));
  ftra_gate           u_ftra (.a(t5), .b(t2), .c(t9), .d(t10), .e(sel.s11),
                              .p(g[15]), .q(g[16]), .r(f1), .s(f2), .t(f3));
  fredkin_gate        u_fg5  (.a(sel.s12), .b(f1),    .c(f2),    .p(g[17]), .q(func1), .r(g[18]));
  fredkin_gate        u_fg6  (.a(sel.s13), .b(func1), .c(f3),    .p(g[19]), .q(func),  .r(g[20]));
endmodule
