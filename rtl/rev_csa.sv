// Reversible WIDTH-bit carry-save adder (3:2 compressor row).
// One TSG full adder per bit position adds x[i], y[i] and z[i] (z enters as
// the TSG carry input D, C = 0). The sum bits form s; the carry bits are
// returned already moved up one position in c, so x + y + z = s + c as long
// as the total fits in WIDTH bits (the carry out of the top position is
// dropped; callers size WIDTH so that it is always 0).
// The 24 x 24 multiplier sums its partial products with rows of these
// (through rev_csa_tree). Purely combinational.
module rev_csa #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [WIDTH-1:0] z,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] c
);
  logic [WIDTH-1:0] cy, g_p, g_q;
  for (genvar i = 0; i < int'(WIDTH); i++) begin : g_bit
    tsg_gate u_tsg (.a(x[i]), .b(y[i]), .c(1'b0), .d(z[i]),
                    .p(g_p[i]), .q(g_q[i]), .r(s[i]), .s(cy[i]));
  end
  assign c = {cy[WIDTH-2:0], 1'b0};

  logic unused;
  assign unused = ^{g_p, g_q, cy[WIDTH-1]};
endmodule
