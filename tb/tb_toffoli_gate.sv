// Self-checking testbench for toffoli_gate: applies all input combinations and
// compares every output with the gate's defining equations.
module tb_toffoli_gate;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  toffoli_gate dut (.a, .b, .c, .p, .q, .r);
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
    for (int v = 0; v < 2**3; v++) begin
      {a, b, c} = 3'(v);
      #1;
      chk(p, a, "P");
      chk(q, b, "Q");
      chk(r, (a & b) ^ c, "R");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
