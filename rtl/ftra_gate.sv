// FTRA gate: 5x5 reversible adder/subtractor cell.
//
// Function:
//   P = A
//   Q = B
//   R = A ^ B ^ C ^ D
//   S = (A^B)&(C^D) ^ A&B ^ D
//   T = (A^B)&(C^D) ^ ~A&B ^ D ^ E
// With the addend on C and D = E = 0 it is a full adder: R is the sum and S
// the carry (majority of A, B, C). With the borrow-in on D and C = E = 0 it
// is a full subtractor computing A - B - D: R is the difference and T the
// borrow (~A&B | ~(A^B)&D). With constants on C, D and E the same outputs
// give the twelve logic functions of the ALU (XOR/XNOR on R, AND/OR/NAND/NOR
// on S, A|~B, ~A|B, A&~B, ~A&B on T); E only inverts T.
//
// P, Q, R and T are the published equations. The carry equation S is this
// design's: it is the simplest function that gives the carry in adder mode
// and the AND, OR, NAND and NOR results the ALU's operation table expects
// on S, and it keeps the gate a bijection (given A, B and C^D, S fixes D,
// and T then fixes E). With these five equations the output parity equals
// the input parity XOR A, so the cell is not parity preserving on its own.
//
// Interface: single-bit inputs a..e and outputs p..t. Purely combinational,
// no clock, no latency.
module ftra_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t
);
  logic ab_x, cd_x, shared;

  always_comb begin
    ab_x   = a ^ b;
    cd_x   = c ^ d;
    shared = ab_x & cd_x;
    p      = a;
    q      = b;
    r      = ab_x ^ cd_x;
    s      = shared ^ (a & b) ^ d;
    t      = shared ^ (~a & b) ^ d ^ e;
  end
endmodule
