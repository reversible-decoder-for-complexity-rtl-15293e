// Self-checking testbench for gcd_ff_unit: random next-state values; after
// each falling clock edge the state must equal the value presented at that
// edge (00 under reset), and state_n / state_copy must agree with it. The
// state must not move while the clock is low.
module tb_gcd_ff_unit;
  int checks = 0, failures = 0;
  logic       clk = 1'b1, rst;
  logic [1:0] next_state, state, state_n, state_copy, expected;
  gcd_ff_unit dut (.clk, .rst, .next_state, .state, .state_n, .state_copy);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks += 3;
    if (state !== expected)    begin failures++; $display("FAIL %s state=%b expected %b", what, state, expected); end
    if (state_n !== ~state)    begin failures++; $display("FAIL %s state_n", what); end
    if (state_copy !== state)  begin failures++; $display("FAIL %s state_copy", what); end
  endtask

  initial begin
    rst = 1'b1;
    next_state = 2'b11;
    for (int n = 0; n < 400; n++) begin
      @(posedge clk);
      #2;
      rst = (n < 2) || ($urandom_range(0, 19) == 0);
      next_state = 2'($urandom);
      @(negedge clk);
      expected = rst ? 2'b00 : next_state;
      #1;
      check("after falling edge");
      next_state = ~next_state;
      #1;
      check("clock low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
