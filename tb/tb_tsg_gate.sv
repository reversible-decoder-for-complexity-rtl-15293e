// Self-checking testbench for tsg_gate: applies all input combinations and
// compares every output with the gate's defining equations.
module tb_tsg_gate;
  int checks = 0, failures = 0;
  logic a, b, c, d, p, q, r, s;
  tsg_gate dut (.a, .b, .c, .d, .p, .q, .r, .s);
  logic [3:0] outs;
  bit seen [16];
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
    for (int v = 0; v < 2**4; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      chk(p, a, "P");
      chk(q, (~a & ~c) ^ ~b, "Q");
      chk(r, (~a & ~c) ^ ~b ^ d, "R");
      chk(s, (((~a & ~c) ^ ~b) & d) ^ ((a & b) ^ c), "S");
      if (c == 1'b0) begin   // full-adder use
        chk(r, a ^ b ^ d, "sum");
        chk(s, (a & b) | (a & d) | (b & d), "carry");
      end
      // reversibility: every input maps to a different output
      outs = {p, q, r, s};
      chk(seen[outs], 1'b0, "output pattern unique");
      seen[outs] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
