// Self-checking testbench for irr_rca (8 bits), the conventional adder:
// all operand pairs with both carry-in values, checked against integer
// addition.
module tb_irr_rca;
  int checks = 0, failures = 0;
  logic [7:0] a, b, sum;
  logic       cin, cout;
  irr_rca dut (.a, .b, .cin, .sum, .cout);

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
        for (int c = 0; c < 2; c++) begin
          a = 8'(i); b = 8'(j); cin = 1'(c);
          #1;
          checks++;
          if ({cout, sum} !== 9'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d + %0d + %0d = %0d", i, j, c, {cout, sum});
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
