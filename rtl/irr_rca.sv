// Conventional (irreversible) WIDTH-bit ripple-carry adder, the baseline the
// reversible TSG adder is compared against. Each bit is an ordinary full
// adder of AND, OR and XOR gates: sum = a ^ b ^ carry, carry out =
// a b | carry (a ^ b). Signals fan out freely and no garbage lines exist.
// The comparison circuit and its 8-bit size follow the document, which
// shows only its critical path (four chained carry stages for 4 bits); the
// gate-level form of each full adder is the textbook one, this design's
// choice.
// Interface: a, b, cin in; sum, cout out, sum + 2^WIDTH * cout = a + b + cin.
// Purely combinational; the carry ripples through WIDTH full adders.
module irr_rca #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] carry;
  assign carry[0] = cin;
  for (genvar i = 0; i < int'(WIDTH); i++) begin : g_bit
    logic half;
    assign half       = a[i] ^ b[i];
    assign sum[i]     = half ^ carry[i];
    assign carry[i+1] = (a[i] & b[i]) | (carry[i] & half);
  end
  assign cout = carry[WIDTH];
endmodule
