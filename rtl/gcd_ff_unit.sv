// Flip-flop module of the GCD control unit: the state register.
// Two reversible master-slave D flip-flops hold the binary-encoded state
// (state[1:0]); both change at the falling edge of clk. Each flip-flop also
// gives the inverted state and a second copy of the state from its output
// gates. Two flip-flops and binary encoding follow the document.
// Interface: clk, rst (synchronous, active high), next_state in;
// state, state_n, state_copy out.
module gcd_ff_unit (
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] next_state,
  output logic [1:0] state,
  output logic [1:0] state_n,
  output logic [1:0] state_copy
);
  for (genvar i = 0; i < 2; i++) begin : g_ff
    rev_dff u_ff (.clk(clk), .rst(rst), .d(next_state[i]),
                  .q(state[i]), .q_bar(state_n[i]), .q_copy(state_copy[i]));
  end
endmodule
