// Toffoli (TF) gate: the 3x3 controlled-controlled NOT, P = A, Q = B,
// R = AB xor C. With C = 0 it forms the AND of A and B, which is how the
// multiplier builds its partial products. Purely combinational. The
// equations are the standard definition of the gate.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
