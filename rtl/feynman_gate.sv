// Feynman (CNOT) gate: the 2x2 reversible gate P = A, Q = A xor B.
// With B tied to 0 it copies A onto a fresh line (the way fan-out is done in
// reversible logic); with B tied to 1 it produces the complement of A.
// Purely combinational, no timing. The equations follow the gate as it is
// usually defined; nothing here is a design choice.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
