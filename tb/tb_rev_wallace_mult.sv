// Self-checking testbench for rev_wallace_mult (8 x 8): every operand pair,
// checked against integer multiplication; a 4 x 4 instance is checked too.
module tb_rev_wallace_mult;
  int checks = 0, failures = 0;
  logic [7:0]  a, b;
  logic [15:0] p;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  rev_wallace_mult          dut  (.a, .b, .p);
  rev_wallace_mult #(.N(4)) dut4 (.a(a4), .b(b4), .p(p4));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        a4 = 4'(i); b4 = 4'(j);
        #1;
        checks++;
        if (p !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", i, j, p);
        end
        if (i < 16 && j < 16) begin
          checks++;
          if (p4 !== 8'(i * j)) begin failures++; $display("FAIL 4x4 %0d * %0d = %0d", i, j, p4); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
