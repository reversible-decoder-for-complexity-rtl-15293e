// TSG gate: a 4x4 reversible gate that works as a full adder.
//   P = A
//   Q = A'C' xor B'
//   R = (A'C' xor B') xor D
//   S = (A'C' xor B')D xor (AB xor C)
// With C = 0, Q = A xor B, R = A xor B xor D (the sum) and
// S = (A xor B)D xor AB (the carry out), so A, B are the addends and D the
// carry in. These equations are the published TSG definition; the adders
// here only rely on the full-adder behaviour with C = 0. Purely combinational.
module tsg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic t;
  assign t = (~a & ~c) ^ ~b;
  assign p = a;
  assign q = t;
  assign r = t ^ d;
  assign s = (t & d) ^ ((a & b) ^ c);
endmodule
