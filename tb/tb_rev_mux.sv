// Self-checking testbench for rev_mux (4-to-1): every data pattern with every
// select value; y must equal the selected data bit.
module tb_rev_mux;
  int checks = 0, failures = 0;
  logic [3:0] d;
  logic [1:0] sel;
  logic       y;
  rev_mux dut (.d, .sel, .y);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int s = 0; s < 4; s++) begin
        d   = 4'(v);
        sel = 2'(s);
        #1;
        checks++;
        if (y !== ((v >> s) & 1)) begin failures++; $display("FAIL d=%b sel=%0d y=%b", d, sel, y); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
