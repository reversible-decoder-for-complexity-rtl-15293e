// Reversible fan-out: K copies of one signal.
// Reversible circuits forbid a wire that drives more than one gate, so a
// signal needed in K places is copied by a chain of K-1 Feynman gates, each
// with its target tied to 0 (Q = A xor 0 = A). The signal itself travels down
// the chain through the control outputs and comes out as copy y[K-1].
// Interface: x in, y[K-1:0] out, all equal to x. Purely combinational.
module rev_fanout #(
  parameter int unsigned K = 2
) (
  input  logic         x,
  output logic [K-1:0] y
);
  logic [K-1:0] ctl;
  assign ctl[0] = x;
  for (genvar i = 0; i < int'(K) - 1; i++) begin : g_copy
    feynman_gate u_fg (.a(ctl[i]), .b(1'b0), .p(ctl[i+1]), .q(y[i]));
  end
  assign y[K-1] = ctl[K-1];
endmodule
