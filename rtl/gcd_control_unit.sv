// Reversible control unit of a subtract-compare-swap GCD processor.
// The datapath (not part of this unit) holds two numbers x and y and reports
// eq (x == y) and lt (x < y). The unit repeatedly subtracts the smaller
// number from the larger until they are equal:
//   IDLE: while start is high, assert load and go to CMP
//   CMP : if eq go to DONE; if lt go to SWAP; else assert sub and stay
//   SWAP: assert swap, go back to CMP
//   DONE: assert done; go back to IDLE once start is low
// It is built from three modules as the design prescribes: the flip-flop
// module (two reversible master-slave D flip-flops, binary state encoding),
// the regeneration module (Feynman copies of state and inputs, so that no
// wire drives two gates) and the output module (next state and controls
// from Fredkin gates). The state names, codes and control signals are this
// design's own, read from the algorithm.
// Timing: the state changes at the falling edge of clk. The controls are
// combinational in the state and the inputs (Mealy outputs), so a datapath
// clocked at the same falling edge acts on them together with the state
// change; its new eq and lt then decide the next edge. One subtract or swap
// step takes one clock cycle. rst is synchronous (sampled at the falling
// edge) and active high.
// The state register is two master-slave latch pairs, so lint sees a loop
// from the state through the output module back to the state; it is broken
// by the two latches, which are never transparent together.
module gcd_control_unit
  import gcd_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  logic eq,
  input  logic lt,
  output logic load,
  output logic swap,
  output logic sub,
  output logic done
);
  logic [1:0] state, state_n, state_copy, next_state;
  logic [5:0] s0_c, s1_c;
  logic [2:0] eq_c;
  logic [1:0] lt_c;
  logic [3:0] start_c;
  gcd_ctrl_t  ctrl;

  gcd_ff_unit u1 (.clk(clk), .rst(rst), .next_state(next_state),
                  .state(state), .state_n(state_n), .state_copy(state_copy));

  gcd_regen_unit u2 (.state(state), .eq(eq), .lt(lt), .start(start),
                     .s0_c(s0_c), .s1_c(s1_c), .eq_c(eq_c), .lt_c(lt_c),
                     .start_c(start_c));

  gcd_op_unit u3 (.s0_c(s0_c), .s1_c(s1_c), .eq_c(eq_c), .lt_c(lt_c),
                  .start_c(start_c), .next_state(next_state), .ctrl(ctrl));

  assign load = ctrl.load;
  assign swap = ctrl.swap;
  assign sub  = ctrl.sub;
  assign done = ctrl.done;

  logic unused;
  assign unused = ^{state_n, state_copy};
endmodule
