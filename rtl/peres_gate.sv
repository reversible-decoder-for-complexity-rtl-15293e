// Peres gate: the 3x3 reversible gate P = A, Q = A xor B, R = AB xor C.
// With C = 0 it is a reversible half adder (Q is the sum, R the carry).
// Purely combinational.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
