// Self-checking testbench for gcd_regen_unit: for every combination of the
// five inputs, every copy must equal its source.
module tb_gcd_regen_unit;
  int checks = 0, failures = 0;
  logic [1:0] state;
  logic       eq, lt, start;
  logic [5:0] s0_c, s1_c;
  logic [2:0] eq_c;
  logic [1:0] lt_c;
  logic [3:0] start_c;
  gcd_regen_unit dut (.state, .eq, .lt, .start, .s0_c, .s1_c, .eq_c, .lt_c, .start_c);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {state, eq, lt, start} = 5'(v);
      #1;
      checks += 5;
      if (s0_c !== {6{state[0]}}) begin failures++; $display("FAIL s0 v=%0d", v); end
      if (s1_c !== {6{state[1]}}) begin failures++; $display("FAIL s1 v=%0d", v); end
      if (eq_c !== {3{eq}})       begin failures++; $display("FAIL eq v=%0d", v); end
      if (lt_c !== {2{lt}})       begin failures++; $display("FAIL lt v=%0d", v); end
      if (start_c !== {4{start}}) begin failures++; $display("FAIL start v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
