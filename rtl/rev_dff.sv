// Reversible edge-triggered D flip-flop (master-slave).
// Two reversible D latches in series: the master is enabled by clk and the
// slave by the clock inverted, so the master follows d while clk is high and
// the slave passes the master's value on while clk is low. The output
// therefore takes the value d had at the falling edge of clk and holds it
// for the whole cycle. After the slave, a Fredkin gate (control = q, B = 1,
// C = 0) produces q_bar on Q and q on R, and a Feynman gate with a zero
// target copies q, so the flip-flop offers q, q_bar and a second copy of q
// without any wire driving two gates.
// Master-slave latches, the inverter on the slave, and the Fredkin and
// Feynman output gates follow the document. The reset is this design's
// addition: a Fredkin gate forces the data input to 0 while rst is high, so
// the reset takes effect at the falling edge (synchronous).
// The two latches show up as latches in lint; that is the structure intended.
// Interface: clk, rst, d in; q, q_bar, q_copy out.
module rev_dff (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q,
  output logic q_bar,
  output logic q_copy
);
  logic d_eff, rst_p, rst_r;
  // rst = 0: Q = d; rst = 1: Q = 0
  fredkin_gate u_rst (.a(rst), .b(d), .c(1'b0), .p(rst_p), .q(d_eff), .r(rst_r));

  logic clk_n, m, s, m_n, s_n;
  assign clk_n = ~clk;
  rev_dlatch u_master (.en(clk),   .d(d_eff), .q(m), .q_n(m_n));
  rev_dlatch u_slave  (.en(clk_n), .d(m),     .q(s), .q_n(s_n));

  logic fr_p, q_int;
  fredkin_gate u_out (.a(s), .b(1'b1), .c(1'b0), .p(fr_p), .q(q_bar), .r(q_int));
  feynman_gate u_cp  (.a(q_int), .b(1'b0), .p(q), .q(q_copy));

  logic unused;
  assign unused = ^{rst_p, rst_r, fr_p, m_n, s_n};
endmodule
