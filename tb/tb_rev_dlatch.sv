// Self-checking testbench for rev_dlatch: while en is high q must follow d,
// while en is low q must keep the value d had when en fell, whatever d does;
// q_n must always be the complement of q.
module tb_rev_dlatch;
  int checks = 0, failures = 0;
  logic en, d, q, q_n;
  logic expected;
  rev_dlatch dut (.en, .d, .q, .q_n);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks += 2;
    if (q !== expected) begin failures++; $display("FAIL %s q=%b expected %b", what, q, expected); end
    if (q_n !== ~q)     begin failures++; $display("FAIL %s q_n=%b", what, q_n); end
  endtask

  initial begin
    en = 1'b1;
    d  = 1'b0;
    #1;
    expected = 1'b0;
    check("transparent 0");
    for (int n = 0; n < 200; n++) begin
      en = 1'b1;
      d  = 1'($urandom);
      #1;
      expected = d;
      check("transparent");
      en = 1'b0;
      #1;
      check("closing");
      for (int k = 0; k < 3; k++) begin
        d = ~d;
        #1;
        check("opaque");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
