// Self-checking testbench for rev_csa (16 bits): random triples whose total
// fits in 16 bits; s + c must equal x + y + z, s must be the bitwise parity
// and c the shifted bitwise majority.
module tb_rev_csa;
  int checks = 0, failures = 0;
  logic [15:0] x, y, z, s, c;
  rev_csa dut (.x, .y, .z, .s, .c);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      x = 16'($urandom_range(0, 21844));
      y = 16'($urandom_range(0, 21844));
      z = 16'($urandom_range(0, 21844));
      if (n == 0) begin x = 16'h5554; y = 16'h5554; z = 16'h5554; end
      #1;
      checks += 3;
      if (32'(s) + 32'(c) !== 32'(x) + 32'(y) + 32'(z)) begin failures++; $display("FAIL total"); end
      if (s !== (x ^ y ^ z)) begin failures++; $display("FAIL sum bits"); end
      if (c !== (((x & y) | (x & z) | (y & z)) << 1)) begin failures++; $display("FAIL carry bits"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
