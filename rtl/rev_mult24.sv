// Reversible (K*BLK) x (K*BLK) multiplier built from BLK x BLK Wallace
// multipliers; by default 24 x 24 from 8 x 8 blocks.
// Both operands are cut into K digits of BLK bits. Each digit is copied K
// times with Feynman gates (rev_fanout) so that every copy feeds one of the
// K*K rev_wallace_mult blocks. Product a_i * b_j is shifted by BLK*(i+j)
// and the K*K shifted products are summed by rev_csa_tree (TSG carry-save
// rows, then a TSG ripple-carry adder).
// Building the 24 x 24 multiplier from 8 x 8 Wallace multipliers follows the
// document; how the partial products are summed is this design's choice.
// Interface: a, b in; p = a * b out. Purely combinational.
module rev_mult24 #(
  parameter int unsigned BLK = 8,
  parameter int unsigned K   = 3
) (
  input  logic [K*BLK-1:0]   a,
  input  logic [K*BLK-1:0]   b,
  output logic [2*K*BLK-1:0] p
);
  localparam int unsigned W = 2 * K * BLK;

  // a_c[n][k]: copy k of operand bit n (likewise b_c)
  logic [K-1:0] a_c [K*BLK];
  logic [K-1:0] b_c [K*BLK];
  for (genvar n = 0; n < int'(K * BLK); n++) begin : g_copy
    rev_fanout #(.K(K)) u_fa (.x(a[n]), .y(a_c[n]));
    rev_fanout #(.K(K)) u_fb (.x(b[n]), .y(b_c[n]));
  end

  logic [W-1:0] rows [K*K];
  for (genvar i = 0; i < int'(K); i++) begin : g_i
    for (genvar j = 0; j < int'(K); j++) begin : g_j
      logic [BLK-1:0]   ad, bd;
      logic [2*BLK-1:0] prod;
      for (genvar n = 0; n < int'(BLK); n++) begin : g_bit
        assign ad[n] = a_c[i*BLK+n][j];   // copy j of digit i of a
        assign bd[n] = b_c[j*BLK+n][i];   // copy i of digit j of b
      end
      rev_wallace_mult #(.N(BLK)) u_m (.a(ad), .b(bd), .p(prod));
      assign rows[i*K+j] = {{(W-2*BLK){1'b0}}, prod} << (BLK * (i + j));
    end
  end

  rev_csa_tree #(.WIDTH(W), .R(K * K)) u_sum (.rows(rows), .total(p));
endmodule
