// Fredkin gate: a 3x3 conservative reversible gate (controlled swap).
//
// Function: P = A, Q = ~A&B ^ A&C, R = ~A&C ^ A&B. When the control A is 0
// the data inputs pass straight (Q = B, R = C); when A is 1 they are swapped
// (Q = C, R = B). The number of ones is the same on the inputs and the
// outputs, so the gate is also parity preserving. In the ALU it serves as a
// 2:1 multiplexer (output Q selects B or C under A) and, with C driven by a
// mode bit, as an AND / OR cell: Q = ~A&B when C = 0 and Q = A|B when C = 1.
//
// Interface: single-bit inputs a, b, c and outputs p, q, r. Purely
// combinational, no clock, no latency. The equations are the published
// definition of the gate; only the port names are this design's choice.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = (~a & b) ^ (a & c);
    r = (~a & c) ^ (a & b);
  end
endmodule
