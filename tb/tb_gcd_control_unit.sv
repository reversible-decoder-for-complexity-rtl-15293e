// Self-checking testbench for gcd_control_unit, run with a behavioural GCD
// datapath (two 8-bit registers x and y that act on load, swap and sub at
// the same falling clock edge that moves the control unit's state, and
// report eq and lt). The datapath samples the controls just before the
// falling edge, so that it reads the values of the ending cycle. For random operand pairs it checks
// that done comes up with x equal to the GCD computed here by Euclid's
// remainder method, and that the number of cycles from load to done equals
// one per compare plus one per swap of the subtract-compare-swap algorithm. It also checks that done clears after start is dropped, and
// that a reset in the middle of a computation returns the unit to idle.
module tb_gcd_control_unit;
  int checks = 0, failures = 0;
  logic clk = 1'b1, rst, start, eq, lt, load, swap, sub, done;
  logic [7:0] op_x, op_y, x, y;
  int n_swap = 0, n_sub = 0;

  gcd_control_unit dut (.clk, .rst, .start, .eq, .lt, .load, .swap, .sub, .done);

  always #5 clk = ~clk;

  // datapath model
  logic load_s = 1'b0, swap_s = 1'b0, sub_s = 1'b0;
  always @(posedge clk) begin
    #4;
    load_s = load; swap_s = swap; sub_s = sub;
  end
  always @(negedge clk) begin
    if (load_s) begin
      x <= op_x; y <= op_y;
    end else if (swap_s) begin
      x <= y; y <= x; n_swap++;
    end else if (sub_s) begin
      x <= x - y; n_sub++;
    end
  end
  assign eq = (x == y);
  assign lt = (x < y);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gcd_ref(int a, int b);
    while (b != 0) begin
      int t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // cycles the control unit should need: one per compare, one per swap
  function automatic int steps_ref(int a, int b);
    int n = 0;
    forever begin
      n++;
      if (a == b) break;
      if (a < b) begin
        int t = a; a = b; b = t;
        n++;
      end else a = a - b;
    end
    return n;
  endfunction

  task automatic run_one(int a, int b);
    int cycles = 0;
    op_x = 8'(a); op_y = 8'(b);
    @(posedge clk); #2;
    start = 1'b1;
    #2;                           // just before the falling edge
    checks++;
    if (!load) begin failures++; $display("FAIL no load for %0d,%0d", a, b); end
    @(negedge clk);               // operands loaded, state leaves IDLE
    forever begin
      @(posedge clk); #4;
      if (done || cycles >= 2000) break;
      cycles++;
    end
    checks += 2;
    if (x !== 8'(gcd_ref(a, b))) begin failures++; $display("FAIL gcd(%0d,%0d) got %0d", a, b, x); end
    if (cycles != steps_ref(a, b)) begin
      failures++; $display("FAIL gcd(%0d,%0d) took %0d cycles, expected %0d", a, b, cycles, steps_ref(a, b));
    end
    start = 1'b0;
    repeat (2) @(posedge clk);
    #4;
    checks++;
    if (done) begin failures++; $display("FAIL done stuck after start dropped"); end
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; op_x = 8'd1; op_y = 8'd1;
    x = 8'd0; y = 8'd0;
    repeat (3) @(posedge clk);
    #2 rst = 1'b0;
    run_one(48, 18);
    run_one(7, 7);
    run_one(5, 35);
    run_one(255, 1);
    for (int n = 0; n < 100; n++) run_one($urandom_range(1, 255), $urandom_range(1, 255));

    // reset in the middle of a long computation
    op_x = 8'd200; op_y = 8'd1;
    @(posedge clk); #2 start = 1'b1;
    repeat (10) @(posedge clk);
    #2 rst = 1'b1; start = 1'b0;
    repeat (2) @(posedge clk);
    #2 rst = 1'b0;
    repeat (2) @(posedge clk);
    #4;
    checks++;
    if (load || swap || sub || done) begin failures++; $display("FAIL not idle after reset"); end

    checks += 2;
    if (n_swap == 0) begin failures++; $display("FAIL swap never happened"); end
    if (n_sub == 0)  begin failures++; $display("FAIL subtract never happened"); end
    $display("swaps=%0d subtracts=%0d", n_swap, n_sub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
