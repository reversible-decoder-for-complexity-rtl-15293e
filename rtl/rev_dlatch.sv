// Reversible D latch.
// The held value lives in a level-sensitive storage element (always_latch)
// that copies d while en is high. A Fredkin gate selects what the latch
// shows: control = en, B = the held value, C = d, so its Q output is d
// itself while the latch is transparent and the held value while it is
// closed. A Feynman gate with its target tied to 1 then gives q and its
// complement q_n. Lint reports the storage element as a latch: that is
// intended, the flip-flop is built from two of these latches.
// Building the latch from Fredkin and Feynman gates follows the document;
// the gate wiring and the enable polarity (transparent while en = 1) are
// this design's choices.
// Interface: en, d in; q, q_n out. q follows d while en = 1 and holds the
// last value while en = 0.
module rev_dlatch (
  input  logic en,
  input  logic d,
  output logic q,
  output logic q_n
);
  logic held, sel, fr_p, fr_r;

  always_latch begin
    if (en) held = d;
  end

  fredkin_gate u_fr (.a(en), .b(held), .c(d), .p(fr_p), .q(sel), .r(fr_r));
  feynman_gate u_fn (.a(sel), .b(1'b1), .p(q), .q(q_n));

  logic unused;
  assign unused = fr_p ^ fr_r;
endmodule
