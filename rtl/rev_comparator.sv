// Reversible W-bit magnitude comparator built on the reversible decoder.
// A 2W-to-2^(2W) decoder turns {a, b} into one-hot minterm lines; line i
// stands for a = i >> W, b = i mod 2^W. Every line belongs to exactly one of
// the three relations, so each output is the OR of its lines, merged by a
// chain of Feynman gates (rev_merge) with masks computed at elaboration:
//   equal = a == b, less = a < b, greater = a > b.
// The lines pass from one merge chain to the next through the Feynman
// control outputs, so none drives two gates. Building the comparator from
// the decoder and the 2-bit default are the document's; the line assignment
// is this design's. Interface: a, b in; equal, less, greater out.
// Purely combinational.
module rev_comparator #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         equal,
  output logic         less,
  output logic         greater
);
  localparam int unsigned L = 2 ** (2 * W);

  // rel = 0: a == b, 1: a < b, 2: a > b
  function automatic logic [L-1:0] rel_mask(int rel);
    logic [L-1:0] m;
    for (int i = 0; i < int'(L); i++) begin
      int unsigned av, bv;
      av = i / (2 ** W);
      bv = i % (2 ** W);
      case (rel)
        0:       m[i] = (av == bv);
        1:       m[i] = (av < bv);
        default: m[i] = (av > bv);
      endcase
    end
    return m;
  endfunction

  localparam logic [L-1:0] EQ_M = rel_mask(0);
  localparam logic [L-1:0] LT_M = rel_mask(1);
  localparam logic [L-1:0] GT_M = rel_mask(2);

  logic [L-1:0] line, t1, t2, t3;
  rev_decoder #(.N(2 * W)) u_dec (.in({a, b}), .out(line));

  rev_merge #(.L(L), .MASK(EQ_M)) u_eq (.lines(line), .thru(t1), .y(equal));
  rev_merge #(.L(L), .MASK(LT_M)) u_lt (.lines(t1),   .thru(t2), .y(less));
  rev_merge #(.L(L), .MASK(GT_M)) u_gt (.lines(t2),   .thru(t3), .y(greater));

  logic unused;
  assign unused = ^t3;
endmodule
