// Regeneration module of the GCD control unit.
// Reversible logic lets no wire drive two gates, so every signal the output
// module needs more than once is copied here with chains of Feynman gates
// (rev_fanout). Each state bit is needed by six output multiplexers; eq by
// three gates, lt by two and start by four (see gcd_op_unit). Using Feynman
// gates for the copies follows the document; the copy counts follow from this
// design's output module.
// Interface: state, eq, lt, start in; their copies out. Combinational.
module gcd_regen_unit (
  input  logic [1:0] state,
  input  logic       eq,
  input  logic       lt,
  input  logic       start,
  output logic [5:0] s0_c,
  output logic [5:0] s1_c,
  output logic [2:0] eq_c,
  output logic [1:0] lt_c,
  output logic [3:0] start_c
);
  rev_fanout #(.K(6)) u_s0 (.x(state[0]), .y(s0_c));
  rev_fanout #(.K(6)) u_s1 (.x(state[1]), .y(s1_c));
  rev_fanout #(.K(3)) u_eq (.x(eq),       .y(eq_c));
  rev_fanout #(.K(2)) u_lt (.x(lt),       .y(lt_c));
  rev_fanout #(.K(4)) u_st (.x(start),    .y(start_c));
endmodule
