// Self-checking testbench for rev_srff. It first replays the published
// waveform sequence (r while the clock is high, then s, then s and r
// together) and checks q and qbar in each phase. Then it applies random s,
// r and clock levels and compares q and qbar with a reference model of the
// gated SR latch, kept here.
module tb_rev_srff;
  int checks = 0, failures = 0;
  logic clk, s, r, q, qbar;
  logic m;     // reference stored value
  rev_srff dut (.clk, .s, .r, .q, .qbar);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect2(logic eq, logic eqb, string what);
    checks++;
    if (q !== eq || qbar !== eqb) begin
      failures++;
      if (failures < 10) $display("FAIL %s: clk=%b s=%b r=%b q=%b qbar=%b", what, clk, s, r, q, qbar);
    end
  endtask

  int n_set = 0, n_reset = 0, n_both = 0, n_hold = 0;

  initial begin
    // the published sequence
    clk = 1'b1; s = 1'b0; r = 1'b0;
    #4 clk = 1'b0;
    #1 clk = 1'b1; r = 1'b1;
    #1 expect2(1'b0, 1'b1, "reset while clk high");
    #1 clk = 1'b0;
    #1 r = 1'b0;
    #1 expect2(1'b0, 1'b1, "hold after reset");
    clk = 1'b1; s = 1'b1;
    #1 expect2(1'b1, 1'b0, "set while clk high");
    clk = 1'b0;
    #1 expect2(1'b1, 1'b0, "hold after set");
    r = 1'b1;
    #1 expect2(1'b1, 1'b0, "inputs ignored while clk low");
    clk = 1'b1;
    #1 expect2(1'b1, 1'b1, "s and r together");
    clk = 1'b0;
    #1 expect2(1'b0, 1'b1, "clock falls with s and r high");

    // random levels against the reference model
    s = 1'b0; r = 1'b1; clk = 1'b1;
    #1 m = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      clk = 1'($urandom); s = 1'($urandom); r = 1'($urandom);
      #1;
      if (clk && (s || r)) m = s && !r;
      if (clk && s && r) begin
        expect2(1'b1, 1'b1, "random s=r=1"); n_both++;
      end else begin
        expect2(m, ~m, "random");
        if (clk && s) n_set++;
        else if (clk && r) n_reset++;
        else n_hold++;
      end
    end
    checks++;
    if (n_set == 0 || n_reset == 0 || n_both == 0 || n_hold == 0) begin
      failures++; $display("FAIL a case never occurred");
    end
    $display("set=%0d reset=%0d both=%0d hold=%0d", n_set, n_reset, n_both, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
