// Self-checking testbench for feynman_gate: applies all input combinations and
// compares every output with the gate's defining equations.
module tb_feynman_gate;
  int checks = 0, failures = 0;
  logic a, b, p, q;
  feynman_gate dut (.a, .b, .p, .q);
  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**2; v++) begin
      {a, b} = 2'(v);
      #1;
      chk(p, a, "P");
      chk(q, a ^ b, "Q");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
