// Self-checking testbench for gcd_op_unit: every state with every value of
// start, eq and lt; next state and the four controls are compared with a
// transition table written out independently below.
module tb_gcd_op_unit;
  import gcd_pkg::*;
  int checks = 0, failures = 0;
  logic [1:0] state;
  logic       eq, lt, start;
  logic [1:0] next_state;
  gcd_ctrl_t  ctrl;
  gcd_op_unit dut (.s0_c({6{state[0]}}), .s1_c({6{state[1]}}), .eq_c({3{eq}}),
                   .lt_c({2{lt}}), .start_c({4{start}}), .next_state, .ctrl);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp_next;
    gcd_ctrl_t  exp_ctrl;
    for (int v = 0; v < 32; v++) begin
      {state, eq, lt, start} = 5'(v);
      exp_ctrl = '0;
      case (gcd_state_t'(state))
        S_IDLE: begin exp_next = start ? 2'b01 : 2'b00; exp_ctrl.load = start; end
        S_CMP:  begin
          if (eq)      exp_next = 2'b11;
          else if (lt) exp_next = 2'b10;
          else begin   exp_next = 2'b01; exp_ctrl.sub = 1'b1; end
        end
        S_SWAP: begin exp_next = 2'b01; exp_ctrl.swap = 1'b1; end
        default: begin exp_next = start ? 2'b11 : 2'b00; exp_ctrl.done = 1'b1; end
      endcase
      #1;
      checks += 2;
      if (next_state !== exp_next) begin failures++; $display("FAIL next v=%0d got %b exp %b", v, next_state, exp_next); end
      if (ctrl !== exp_ctrl)       begin failures++; $display("FAIL ctrl v=%0d got %b exp %b", v, ctrl, exp_ctrl); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
