// Self-checking testbench for rev_mult24 (24 x 24 from 8 x 8 blocks):
// corner operands and random pairs, checked against 64-bit multiplication.
module tb_rev_mult24;
  int checks = 0, failures = 0;
  logic [23:0] a, b;
  logic [47:0] p;
  rev_mult24 dut (.a, .b, .p);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] corner [6] = '{24'h0, 24'h1, 24'hFFFFFF, 24'h800000, 24'h00FF00, 24'hABCDEF};
    longint unsigned exp;
    for (int i = 0; i < 6; i++) begin
      for (int j = 0; j < 6; j++) begin
        a = corner[i]; b = corner[j];
        #1;
        exp = longint'(a) * longint'(b);
        checks++;
        if (p !== 48'(exp)) begin failures++; $display("FAIL %h * %h = %h", a, b, p); end
      end
    end
    for (int n = 0; n < 20000; n++) begin
      a = 24'($urandom); b = 24'($urandom);
      #1;
      exp = longint'(a) * longint'(b);
      checks++;
      if (p !== 48'(exp)) begin
        failures++;
        if (failures < 10) $display("FAIL %h * %h = %h", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
