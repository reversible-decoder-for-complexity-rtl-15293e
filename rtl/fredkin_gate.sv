// Fredkin gate: the 3x3 controlled swap. The control A passes through as P.
// When A = 0 the other two lines pass straight (Q = B, R = C); when A = 1 they
// are exchanged (Q = C, R = B). Written as sums of products:
//   Q = A'B xor AC,  R = A'C xor AB.
// With a constant on one data line the gate acts as an AND gate or a 2:1
// multiplexer, which is how the decoders and the control unit use it.
// Purely combinational.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);
endmodule
