// Self-checking testbench for rev_dff: random data changes while the clock is
// high and while it is low. After every falling edge q must hold the value d
// had at that edge (0 while rst was high), must not change while the clock
// is low or high and d moves, and q_bar / q_copy must be the complement / a copy.
module tb_rev_dff;
  int checks = 0, failures = 0;
  logic clk = 1'b1, rst, d, q, q_bar, q_copy;
  logic expected;
  int resets_seen = 0;
  rev_dff dut (.clk, .rst, .d, .q, .q_bar, .q_copy);

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
    if (q !== expected)  begin failures++; $display("FAIL %s t=%0t q=%b expected %b", what, $time, q, expected); end
    if (q_bar !== ~q)    begin failures++; $display("FAIL %s q_bar", what); end
    if (q_copy !== q)    begin failures++; $display("FAIL %s q_copy", what); end
  endtask

  initial begin
    rst = 1'b1;
    d   = 1'b1;
    // clock starts high; d is applied 2 units after each edge
    for (int n = 0; n < 500; n++) begin
      @(posedge clk);
      #2;
      if (n >= 2) rst = ($urandom_range(0, 15) == 0);
      d = 1'($urandom);
      #1;
      if (n > 0) check("clock high, d moved");   // still the previous value
      @(negedge clk);
      expected = rst ? 1'b0 : d;
      if (rst) resets_seen++;
      #1;
      check("after falling edge");
      #1;
      d = ~d;                 // moves while the clock is low
      #1;
      check("clock low, d moved");
    end
    checks++;
    if (resets_seen == 0) begin failures++; $display("FAIL reset never applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
