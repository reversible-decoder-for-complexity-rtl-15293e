// Self-checking testbench for rev_rca (8 bits): all operand pairs with both
// carry-in values, checked against integer addition; the form without a
// carry input (Peres half adder in bit 0) is checked against a + b.
module tb_rev_rca;
  int checks = 0, failures = 0;
  logic [7:0] a, b, sum;
  logic       cin, cout;
  logic [7:0] sum_h;
  logic       cout_h;
  rev_rca dut (.a, .b, .cin, .sum, .cout);
  // half-adder form: no carry input, bit 0 a Peres gate
  rev_rca #(.HALF_LSB(1'b1)) dut_h (.a, .b, .cin, .sum(sum_h), .cout(cout_h));

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
          checks++;
          if ({cout_h, sum_h} !== 9'(i + j)) begin
            failures++;
            if (failures < 10) $display("FAIL half-LSB form %0d + %0d = %0d", i, j, {cout_h, sum_h});
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
