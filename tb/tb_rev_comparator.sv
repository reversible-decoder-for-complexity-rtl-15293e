// Self-checking testbench for rev_comparator: all pairs of 2-bit operands
// (default) and of 3-bit operands; exactly one of equal, less, greater must
// be high and it must match the integer comparison.
module tb_rev_comparator;
  int checks = 0, failures = 0;
  logic [1:0] a, b;
  logic [2:0] a3, b3;
  logic equal, less, greater, e3, l3, g3;
  rev_comparator          dut  (.a, .b, .equal, .less, .greater);
  rev_comparator #(.W(3)) dut3 (.a(a3), .b(b3), .equal(e3), .less(l3), .greater(g3));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < 8; j++) begin
        a3 = 3'(i);
        b3 = 3'(j);
        a  = 2'(i);
        b  = 2'(j);
        #1;
        checks++;
        if ({e3, l3, g3} !== {i == j, i < j, i > j}) begin
          failures++; $display("FAIL W=3 a=%0d b=%0d eq/lt/gt=%b%b%b", i, j, e3, l3, g3);
        end
        if (i < 4 && j < 4) begin
          checks++;
          if ({equal, less, greater} !== {i == j, i < j, i > j}) begin
            failures++; $display("FAIL W=2 a=%0d b=%0d eq/lt/gt=%b%b%b", i, j, equal, less, greater);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
