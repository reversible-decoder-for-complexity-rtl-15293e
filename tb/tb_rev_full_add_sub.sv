// Self-checking testbench for rev_full_add_sub: all eight input combinations,
// sum and carry checked against a + b + cin, difference and borrow against
// a - b - cin computed with integers.
module tb_rev_full_add_sub;
  int checks = 0, failures = 0;
  logic a, b, cin, s, cout, borrow;
  rev_full_add_sub dut (.a, .b, .cin, .s, .cout, .borrow);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total, diff;
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      diff  = int'(a) - int'(b) - int'(cin);
      checks += 3;
      if (s !== 1'(total))          begin failures++; $display("FAIL s v=%0d", v); end
      if (cout !== (total >= 2))    begin failures++; $display("FAIL cout v=%0d", v); end
      if (borrow !== (diff < 0))    begin failures++; $display("FAIL borrow v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
