// Reversible 2^SEL_W-to-1 multiplexer built on the reversible decoder.
// The decoder turns sel into one-hot lines. Line i gates data input d[i]
// through a Fredkin gate (control = d[i], B = 0, C = line, so Q = line AND
// d[i]). At most one gated line can be high, so a chain of Feynman gates on
// one accumulator line (rev_merge) forms their OR, which is d[sel].
// Using the decoder for the multiplexer is the document's idea; the size
// (4-to-1 by default) and the Fredkin gating are this design's choices.
// Interface: d[2^SEL_W-1:0], sel[SEL_W-1:0] in; y = d[sel] out.
// Purely combinational.
module rev_mux #(
  parameter int unsigned SEL_W = 2
) (
  input  logic [2**SEL_W-1:0] d,
  input  logic [SEL_W-1:0]    sel,
  output logic                y
);
  localparam int unsigned L = 2 ** SEL_W;
  logic [L-1:0] line, gated, g_p, g_r, thru;

  rev_decoder #(.N(SEL_W)) u_dec (.in(sel), .out(line));

  for (genvar i = 0; i < int'(L); i++) begin : g_and
    fredkin_gate u_fr (.a(d[i]), .b(1'b0), .c(line[i]),
                       .p(g_p[i]), .q(gated[i]), .r(g_r[i]));
  end

  rev_merge #(.L(L)) u_or (.lines(gated), .thru(thru), .y(y));

  logic unused;
  assign unused = ^{g_p, g_r, thru};
endmodule
