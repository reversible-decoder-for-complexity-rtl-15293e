// Reversible OR of mutually exclusive lines.
// The outputs of a decoder are one-hot, so the OR of any subset of them equals
// their exclusive OR. The subset selected by MASK is therefore merged by a
// chain of Feynman gates acting on one accumulator line that starts at 0:
// each selected line is the control of one gate whose target is the
// accumulator. The selected lines come back out unchanged on thru (the
// Feynman control outputs); lines outside MASK pass through untouched.
// Interface: lines[L-1:0] in, y = OR of lines[i] with MASK[i] = 1.
// Purely combinational.
module rev_merge #(
  parameter int unsigned       L    = 8,
  parameter logic [L-1:0]      MASK = '1
) (
  input  logic [L-1:0] lines,
  output logic [L-1:0] thru,
  output logic         y
);
  logic [L:0] acc;
  assign acc[0] = 1'b0;
  for (genvar i = 0; i < int'(L); i++) begin : g_line
    if (MASK[i]) begin : g_fg
      feynman_gate u_fg (.a(lines[i]), .b(acc[i]), .p(thru[i]), .q(acc[i+1]));
    end else begin : g_pass
      assign thru[i]  = lines[i];
      assign acc[i+1] = acc[i];
    end
  end
  assign y = acc[L];
endmodule
