// Self-checking testbench for rev_decoder: every input value of the 4x16
// (default), 3x8 and 2x4 decoders must raise exactly the output line with
// the same index (out = 1 << in).
module tb_rev_decoder;
  int checks = 0, failures = 0;
  logic [3:0]  in4;
  logic [15:0] out4;
  logic [2:0]  in3;
  logic [7:0]  out3;
  logic [1:0]  in2;
  logic [3:0]  out2;
  rev_decoder          dut  (.in(in4), .out(out4));
  rev_decoder #(.N(3)) dut3 (.in(in3), .out(out3));
  rev_decoder #(.N(2)) dut2 (.in(in2), .out(out2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      in4 = 4'(v);
      in3 = 3'(v);
      in2 = 2'(v);
      #1;
      checks++;
      if (out4 !== 16'(1) << v) begin failures++; $display("FAIL 4x16 in=%0d out=%h", v, out4); end
      checks++;
      if (out3 !== 8'(1) << (v % 8)) begin failures++; $display("FAIL 3x8 in=%0d out=%h", v % 8, out3); end
      checks++;
      if (out2 !== 4'(1) << (v % 4)) begin failures++; $display("FAIL 2x4 in=%0d out=%h", v % 4, out2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
