// Reversible WIDTH-bit ripple-carry adder.
// One TSG gate per bit, used as a full adder: A = a[i], B = b[i], C = 0,
// D = carry in; R is the sum bit and S the carry into the next bit. The P
// and Q outputs of each gate are garbage lines. The structure (a chain of
// TSG full adders) and the 8-bit default follow the document.
// Interface: a, b, cin in; sum, cout out, sum + 2^WIDTH * cout = a + b + cin.
// Purely combinational; the carry ripples through WIDTH gates.
module rev_rca #(
  parameter int unsigned WIDTH    = 8,
  parameter bit          HALF_LSB = 1'b0
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0]   carry;
  logic [WIDTH-1:0] g_p, g_q;
  assign carry[0] = cin;
  for (genvar i = 0; i < int'(WIDTH); i++) begin : g_bit
    if (HALF_LSB && i == 0) begin : g_half
      peres_gate u_pg (.a(a[0]), .b(b[0]), .c(1'b0),
                       .p(g_p[0]), .q(sum[0]), .r(carry[1]));
      assign g_q[0] = carry[0];
    end else begin : g_full
      tsg_gate u_tsg (.a(a[i]), .b(b[i]), .c(1'b0), .d(carry[i]),
                      .p(g_p[i]), .q(g_q[i]), .r(sum[i]), .s(carry[i+1]));
    end
  end
  assign cout = carry[WIDTH];

  logic unused;
  assign unused = ^{g_p, g_q};
endmodule
