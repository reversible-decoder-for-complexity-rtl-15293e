// Output module of the GCD control unit: next state and datapath controls.
// Every output is a 4:1 multiplexer of Fredkin gates (fredkin_mux4) selected
// by the present state, whose four data inputs are constants or functions of
// the status inputs, themselves formed by Fredkin gates:
//   state   next state                      outputs
//   IDLE    start ? CMP : IDLE              load = start
//   CMP     eq ? DONE : lt ? SWAP : CMP     sub  = !eq && !lt
//   SWAP    CMP                             swap = 1
//   DONE    start ? DONE : IDLE             done = 1
// The outputs are Mealy outputs: they depend on the present state and the
// inputs. Computing next state and outputs with Fredkin gates follows the
// document; the state machine itself is this design's reading of the
// subtract-compare-swap algorithm.
// Interface: state copies and input copies from gcd_regen_unit in;
// next_state and ctrl out. Combinational.
module gcd_op_unit
  import gcd_pkg::*;
(
  input  logic [5:0] s0_c,
  input  logic [5:0] s1_c,
  input  logic [2:0] eq_c,
  input  logic [1:0] lt_c,
  input  logic [3:0] start_c,
  output logic [1:0] next_state,
  output gcd_ctrl_t  ctrl
);
  // status functions, each a Fredkin gate (control = eq copy)
  logic lt_n, lt_p, eq_or_lt, eq_or_nlt, eq_or_lt2;
  logic [2:0] g_p, g_r;
  feynman_gate u_inv (.a(lt_c[1]), .b(1'b1), .p(lt_p), .q(lt_n));
  // eq ? 1 : lt
  fredkin_gate u_f0 (.a(eq_c[0]), .b(lt_c[0]), .c(1'b1), .p(g_p[0]), .q(eq_or_lt),  .r(g_r[0]));
  // eq ? 1 : !lt
  fredkin_gate u_f1 (.a(eq_c[1]), .b(lt_n),    .c(1'b1), .p(g_p[1]), .q(eq_or_nlt), .r(g_r[1]));
  // eq ? 1 : lt once more, on the lt line passed through the inverter gate;
  // a NOT gate turns it into !eq && !lt for the subtract control
  fredkin_gate u_f2 (.a(eq_c[2]), .b(lt_p),    .c(1'b1), .p(g_p[2]), .q(eq_or_lt2), .r(g_r[2]));

  // multiplexer inputs, indexed by state code {s1, s0}
  logic [3:0] v_n1, v_n0, v_load, v_swap, v_sub, v_done;
  assign v_n1   = {start_c[0], 1'b0, eq_or_lt,  1'b0};
  assign v_n0   = {start_c[1], 1'b1, eq_or_nlt, start_c[2]};
  assign v_load = {1'b0, 1'b0, 1'b0, start_c[3]};
  assign v_swap = {1'b0, 1'b1, 1'b0, 1'b0};
  assign v_sub  = {1'b0, 1'b0, ~eq_or_lt2, 1'b0};
  assign v_done = {1'b1, 1'b0, 1'b0, 1'b0};

  fredkin_mux4 u_m0 (.v(v_n1),   .s1(s1_c[0]), .s0(s0_c[0]), .y(next_state[1]));
  fredkin_mux4 u_m1 (.v(v_n0),   .s1(s1_c[1]), .s0(s0_c[1]), .y(next_state[0]));
  fredkin_mux4 u_m2 (.v(v_load), .s1(s1_c[2]), .s0(s0_c[2]), .y(ctrl.load));
  fredkin_mux4 u_m3 (.v(v_swap), .s1(s1_c[3]), .s0(s0_c[3]), .y(ctrl.swap));
  fredkin_mux4 u_m4 (.v(v_sub),  .s1(s1_c[4]), .s0(s0_c[4]), .y(ctrl.sub));
  fredkin_mux4 u_m5 (.v(v_done), .s1(s1_c[5]), .s0(s0_c[5]), .y(ctrl.done));

  logic unused;
  assign unused = ^{g_p, g_r};
endmodule
