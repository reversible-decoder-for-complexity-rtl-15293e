// Self-checking testbench for rev_fanout: for both input values, every copy
// must equal the input, for the default K and for a longer chain.
module tb_rev_fanout;
  int checks = 0, failures = 0;
  logic       x;
  logic [1:0] y2;
  logic [4:0] y5;
  rev_fanout          dut  (.x(x), .y(y2));
  rev_fanout #(.K(5)) dut5 (.x(x), .y(y5));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      x = 1'(v);
      #1;
      checks++; if (y2 !== {2{x}}) begin failures++; $display("FAIL K=2 x=%0b y=%b", x, y2); end
      checks++; if (y5 !== {5{x}}) begin failures++; $display("FAIL K=5 x=%0b y=%b", x, y5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
