// Reversible clocked SR flip-flop (gated SR latch).
// While clk is high the inputs act: s alone sets q, r alone resets it, and
// s and r together drive q and qbar both high. While clk is low, or with
// s = r = 0, the stored value holds. When the clock falls with s and r both
// still high, the stored value is 0, so q comes out as 0.
// How it works: Feynman chains copy clk, s and r so that every gate input
// has its own line. Fredkin gates form d = s AND NOT r (control r, B = s,
// C = 0) and s OR r (control s, B = r, C = 1). A Toffoli gate forms the
// enable clk AND (s OR r) of a reversible D latch that stores d. Two more
// Toffoli gates form both = clk AND s AND r. The latch holds 0 whenever
// both is 1, so a Feynman gate gives q = stored XOR both, which here is
// the same as OR; qbar is the latch's complement output.
// The port names (s, r, clk, q, qbar) and the behaviour follow the
// simulation waveform in the document: q and qbar are unknown until the
// first active input, r resets and s sets while clk is high, s = r = 1
// gives q = qbar = 1, and q falls to 0 when the clock then drops. The gate
// network is this design's; the document gives no schematic.
// Interface: clk, s, r in; q, qbar out. Level-sensitive: transparent
// while clk = 1. There is no reset, as in the waveform.
module rev_srff (
  input  logic clk,
  input  logic s,
  input  logic r,
  output logic q,
  output logic qbar
);
  logic [1:0] clk_c;
  logic [2:0] s_c, r_c;
  rev_fanout #(.K(2)) u_clk (.x(clk), .y(clk_c));
  rev_fanout #(.K(3)) u_s   (.x(s),   .y(s_c));
  rev_fanout #(.K(3)) u_r   (.x(r),   .y(r_c));

  // d = s AND NOT r
  logic d, g1_p, g1_r;
  fredkin_gate u_d   (.a(r_c[0]), .b(s_c[0]), .c(1'b0), .p(g1_p), .q(d), .r(g1_r));
  // s OR r
  logic s_or_r, g2_p, g2_r;
  fredkin_gate u_or  (.a(s_c[1]), .b(r_c[1]), .c(1'b1), .p(g2_p), .q(s_or_r), .r(g2_r));
  // latch enable = clk AND (s OR r)
  logic en, g3_p, g3_q;
  toffoli_gate u_en  (.a(clk_c[0]), .b(s_or_r), .c(1'b0), .p(g3_p), .q(g3_q), .r(en));
  // both = clk AND s AND r
  logic cs, both, g4_p, g4_q, g5_p, g5_q;
  toffoli_gate u_cs  (.a(clk_c[1]), .b(s_c[2]), .c(1'b0), .p(g4_p), .q(g4_q), .r(cs));
  toffoli_gate u_bth (.a(cs), .b(r_c[2]), .c(1'b0), .p(g5_p), .q(g5_q), .r(both));

  logic m, m_n;
  rev_dlatch u_lat (.en(en), .d(d), .q(m), .q_n(m_n));

  logic g6_p;
  feynman_gate u_q (.a(both), .b(m), .p(g6_p), .q(q));
  assign qbar = m_n;

  logic unused;
  assign unused = ^{g1_p, g1_r, g2_p, g2_r, g3_p, g3_q, g4_p, g4_q, g5_p, g5_q, g6_p};
endmodule
