// Conventional (irreversible) GCD control unit, the baseline the reversible
// control unit is compared against. It is the same four-state machine
// (IDLE, COMPARE, SWAP, DONE, binary encoded in two flip-flops) written as
// an ordinary state register and next-state/output logic: IDLE loads the
// operands while start is high, COMPARE moves to DONE if x == y and to
// SWAP if x < y and subtracts otherwise, SWAP exchanges x and y and returns
// to COMPARE, DONE holds done
// until start is dropped.
// The document compares the reversible unit with an irreversible one but
// gives neither; the state machine is this design's reading of the
// subtract-compare-swap algorithm, shared with the reversible unit, and the
// state register captures at the falling clock edge like the reversible
// master-slave flip-flops, so both units produce the same outputs in every
// cycle and can drive the same datapath.
// Interface: clk, rst (synchronous, active high, taken at the falling
// edge), start, eq (x == y), lt (x < y) in; load, swap, sub, done out.
// The outputs depend on the state and the inputs (Mealy).
module irr_gcd_control_unit
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
  gcd_state_t state, next_state;
  gcd_ctrl_t  ctrl;

  always_ff @(negedge clk) begin
    if (rst) state <= S_IDLE;
    else     state <= next_state;
  end

  always_comb begin
    ctrl       = '0;
    next_state = state;
    unique case (state)
      S_IDLE: begin
        ctrl.load = start;
        if (start) next_state = S_CMP;
      end
      S_CMP: begin
        if (eq)      next_state = S_DONE;
        else if (lt) next_state = S_SWAP;
        else         ctrl.sub = 1'b1;
      end
      S_SWAP: begin
        ctrl.swap  = 1'b1;
        next_state = S_CMP;
      end
      S_DONE: begin
        ctrl.done = 1'b1;
        if (!start) next_state = S_IDLE;
      end
    endcase
  end

  assign load = ctrl.load;
  assign swap = ctrl.swap;
  assign sub  = ctrl.sub;
  assign done = ctrl.done;
endmodule
