// Double Feynman gate: a 3x3 parity-preserving reversible gate.
//
// Function: P = A, Q = A ^ B, R = A ^ C. The control input A is passed
// through and XORed onto both targets, so the gate acts as a controlled
// inverter (A selects B or ~B on Q) or, with B = C = 0, as a three-way
// fan-out copier of A. Output parity equals input parity
// (A ^ (A^B) ^ (A^C) = A ^ B ^ C), which is what makes a single stuck line
// detectable by a parity check around the gate.
//
// Interface: single-bit inputs a, b, c and outputs p, q, r. Purely
// combinational, no clock, no latency. The equations are the published
// definition of the gate; only the port names are this design's choice.
module double_feynman_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ^ b;
    r = a ^ c;
  end
endmodule
