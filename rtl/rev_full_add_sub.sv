// One-bit full adder and full subtractor on a reversible 3x8 decoder.
// The decoder turns {a, b, cin} into eight one-hot minterm lines m0..m7.
// Each output is the OR of its minterms, and since only one line is high the
// OR is formed with Feynman gates on an accumulator line (rev_merge):
//   s      = m1 + m2 + m4 + m7   (a xor b xor cin, sum and difference alike)
//   cout   = m3 + m5 + m6 + m7   (carry of a + b + cin)
//   borrow = m1 + m2 + m3 + m7   (borrow of a - b - cin)
// Lines needed by more than one output are first copied with Feynman gates
// (rev_fanout), so no wire drives two gates. m0 is a garbage line.
// Building these functions from the reversible decoder is the document's
// idea; the minterm assignment and the treatment of cin as borrow-in for the
// subtractor are this design's reading of it.
// Interface: a, b, cin in; s, cout, borrow out. Purely combinational.
module rev_full_add_sub (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout,
  output logic borrow
);
  logic [7:0] m;
  rev_decoder #(.N(3)) u_dec (.in({a, b, cin}), .out(m));

  // copies: m1, m2 -> s, borrow; m3 -> cout, borrow; m7 -> s, cout, borrow
  logic [1:0] m1c, m2c, m3c;
  logic [2:0] m7c;
  rev_fanout #(.K(2)) u_f1 (.x(m[1]), .y(m1c));
  rev_fanout #(.K(2)) u_f2 (.x(m[2]), .y(m2c));
  rev_fanout #(.K(2)) u_f3 (.x(m[3]), .y(m3c));
  rev_fanout #(.K(3)) u_f7 (.x(m[7]), .y(m7c));

  logic [3:0] s_thru, c_thru, b_thru;
  rev_merge #(.L(4)) u_s (.lines({m7c[0], m[4],   m2c[0], m1c[0]}), .thru(s_thru), .y(s));
  rev_merge #(.L(4)) u_c (.lines({m7c[1], m[6],   m[5],   m3c[0]}), .thru(c_thru), .y(cout));
  rev_merge #(.L(4)) u_b (.lines({m7c[2], m3c[1], m2c[1], m1c[1]}), .thru(b_thru), .y(borrow));

  logic unused;
  assign unused = ^{m[0], s_thru, c_thru, b_thru};
endmodule
