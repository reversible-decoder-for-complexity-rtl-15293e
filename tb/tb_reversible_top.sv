// End-to-end testbench for reversible_top at its default sizes.
// Every circuit is driven through the top's ports and checked against
// arithmetic done here: all decoder inputs, all full adder/subtractor and
// comparator inputs, all multiplexer inputs, random 8-bit additions and
// 8 x 8 and 24 x 24 products, the D flip-flop over random data, the SR
// flip-flop over random set/reset inputs, and complete
// GCD computations with a behavioural datapath on the gcd_ ports (x and y
// registers acting at the falling edge). It counts how often each mechanism
// occurred (every decoder line, carry out, borrow, each comparator relation,
// adder carry out, flip-flop reset and capture of both values, SR set,
// reset and s = r = 1, GCD swap,
// subtract and done) and counts a failure for any that never occurred.
// The conventional adder and multiplier are compared with the reversible
// ones on every operation, and the conventional GCD control unit's outputs with the
// reversible unit's in every clock cycle.
module tb_reversible_top;
  int checks = 0, failures = 0;

  logic        clk = 1'b1, rst;
  logic [3:0]  dec_in;
  logic [15:0] dec_out;
  logic        fas_a, fas_b, fas_cin, fas_s, fas_cout, fas_borrow;
  logic [3:0]  mux_d;
  logic [1:0]  mux_sel;
  logic        mux_y;
  logic [1:0]  cmp_a, cmp_b;
  logic        cmp_equal, cmp_less, cmp_greater;
  logic [7:0]  rca_a, rca_b, rca_sum;
  logic        rca_cin, rca_cout;
  logic [7:0]  irr_rca_sum;
  logic [15:0] irr_mul_p;
  logic        irr_rca_cout;
  logic        irr_gcd_load, irr_gcd_swap, irr_gcd_sub, irr_gcd_done;
  logic [7:0]  mul_a, mul_b;
  logic [15:0] mul_p;
  logic [23:0] m24_a, m24_b;
  logic [47:0] m24_p;
  logic        dff_d, dff_q, dff_q_bar;
  logic        sr_s, sr_r, sr_q, sr_qbar;
  logic        gcd_start, gcd_eq, gcd_lt, gcd_load, gcd_swap, gcd_sub, gcd_done;

  reversible_top dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int dec_line [16];
  int n_cout = 0, n_borrow = 0, n_eq = 0, n_lt = 0, n_gt = 0, n_rca_cout = 0;
  int n_dff_rst = 0, n_dff_one = 0, n_dff_zero = 0;
  int n_sr_set = 0, n_sr_reset = 0, n_sr_both = 0;
  int n_swap = 0, n_sub = 0, n_done = 0;

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // GCD datapath model
  logic [7:0] op_x = 8'd1, op_y = 8'd1, x = 8'd0, y = 8'd0;
  logic load_s = 1'b0, swap_s = 1'b0, sub_s = 1'b0;
  always @(posedge clk) begin
    #4;
    load_s = gcd_load; swap_s = gcd_swap; sub_s = gcd_sub;
    chk({irr_gcd_load, irr_gcd_swap, irr_gcd_sub, irr_gcd_done}
        === {gcd_load, gcd_swap, gcd_sub, gcd_done}, "conventional GCD control unit");
  end
  always @(negedge clk) begin
    if (load_s)      begin x <= op_x; y <= op_y; end
    else if (swap_s) begin x <= y; y <= x; n_swap++; end
    else if (sub_s)  begin x <= x - y; n_sub++; end
  end
  assign gcd_eq = (x == y);
  assign gcd_lt = (x < y);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gcd_ref(int a, int b);
    while (b != 0) begin
      int t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  task automatic combinational_tests();
    for (int v = 0; v < 16; v++) begin
      dec_in = 4'(v);
      #1;
      chk(dec_out == 16'(1) << v, "decoder");
      for (int i = 0; i < 16; i++) if (dec_out[i]) dec_line[i]++;
    end
    for (int v = 0; v < 8; v++) begin
      int t, dif;
      {fas_a, fas_b, fas_cin} = 3'(v);
      #1;
      t   = int'(fas_a) + int'(fas_b) + int'(fas_cin);
      dif = int'(fas_a) - int'(fas_b) - int'(fas_cin);
      chk(fas_s == 1'(t) && fas_cout == (t >= 2) && fas_borrow == (dif < 0), "full adder/subtractor");
      n_cout += int'(fas_cout);
      n_borrow += int'(fas_borrow);
    end
    for (int v = 0; v < 64; v++) begin
      {mux_d, mux_sel} = 6'(v);
      #1;
      chk(mux_y == mux_d[mux_sel], "multiplexer");
    end
    for (int v = 0; v < 16; v++) begin
      {cmp_a, cmp_b} = 4'(v);
      #1;
      chk({cmp_equal, cmp_less, cmp_greater} == {cmp_a == cmp_b, cmp_a < cmp_b, cmp_a > cmp_b}, "comparator");
      n_eq += int'(cmp_equal); n_lt += int'(cmp_less); n_gt += int'(cmp_greater);
    end
    for (int n = 0; n < 2000; n++) begin
      longint unsigned e24;
      rca_a = 8'($urandom); rca_b = 8'($urandom); rca_cin = 1'($urandom);
      mul_a = 8'($urandom); mul_b = 8'($urandom);
      m24_a = 24'($urandom); m24_b = 24'($urandom);
      if (n == 0) begin rca_a = 8'hFF; rca_b = 8'h00; rca_cin = 1'b1; m24_a = '1; m24_b = '1; end
      #1;
      chk({rca_cout, rca_sum} == 9'(int'(rca_a) + int'(rca_b) + int'(rca_cin)), "ripple-carry adder");
      n_rca_cout += int'(rca_cout);
      chk({irr_rca_cout, irr_rca_sum} === {rca_cout, rca_sum}, "conventional ripple-carry adder");
      chk(mul_p == 16'(int'(mul_a) * int'(mul_b)), "8x8 multiplier");
      chk(irr_mul_p === mul_p, "conventional 8x8 multiplier");
      e24 = longint'(m24_a) * longint'(m24_b);
      chk(m24_p == 48'(e24), "24x24 multiplier");
    end
  endtask

  task automatic dff_tests();
    logic expected;
    for (int n = 0; n < 200; n++) begin
      @(posedge clk); #2;
      rst   = ($urandom_range(0, 9) == 0);
      dff_d = 1'($urandom);
      @(negedge clk);
      expected = rst ? 1'b0 : dff_d;
      #1;
      chk(dff_q == expected && dff_q_bar == ~expected, "D flip-flop");
      if (rst) n_dff_rst++;
      else if (dff_q) n_dff_one++;
      else n_dff_zero++;
    end
    @(posedge clk); #2 rst = 1'b0;
  endtask

  // SR flip-flop: inputs change while clk is high, checked while clk is
  // high and again after it falls
  task automatic sr_tests();
    logic m = 1'b0;
    @(posedge clk); #1 sr_s = 1'b0; sr_r = 1'b1;
    @(negedge clk); #1;
    for (int n = 0; n < 200; n++) begin
      @(posedge clk); #1;
      sr_s = 1'($urandom); sr_r = 1'($urandom);
      #2;
      if (sr_s && sr_r) begin
        chk(sr_q && sr_qbar, "SR flip-flop with s and r high");
        m = 1'b0; n_sr_both++;
      end else begin
        if (sr_s) begin m = 1'b1; n_sr_set++; end
        if (sr_r) begin m = 1'b0; n_sr_reset++; end
        chk(sr_q == m && sr_qbar == !m, "SR flip-flop while clk high");
      end
      @(negedge clk); #1;
      chk(sr_q == m && sr_qbar == !m, "SR flip-flop after clk falls");
      sr_s = 1'b0; sr_r = 1'b0;
    end
  endtask

  task automatic gcd_run(int a, int b);
    int cycles = 0;
    op_x = 8'(a); op_y = 8'(b);
    @(posedge clk); #2 gcd_start = 1'b1;
    forever begin
      @(posedge clk); #4;
      if (gcd_done || cycles > 600) break;
      cycles++;
    end
    n_done += int'(gcd_done);
    chk(gcd_done && x == 8'(gcd_ref(a, b)), $sformatf("GCD(%0d,%0d) gave %0d", a, b, x));
    gcd_start = 1'b0;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    rst = 1'b1; gcd_start = 1'b0; dff_d = 1'b0; sr_s = 1'b0; sr_r = 1'b0;
    dec_in = '0; {fas_a, fas_b, fas_cin} = '0; mux_d = '0; mux_sel = '0;
    cmp_a = '0; cmp_b = '0; rca_a = '0; rca_b = '0; rca_cin = 1'b0;
    mul_a = '0; mul_b = '0; m24_a = '0; m24_b = '0;
    foreach (dec_line[i]) dec_line[i] = 0;
    repeat (3) @(posedge clk);
    #2 rst = 1'b0;

    combinational_tests();
    dff_tests();
    sr_tests();
    gcd_run(48, 18);
    gcd_run(13, 91);
    for (int n = 0; n < 30; n++) gcd_run($urandom_range(1, 255), $urandom_range(1, 255));

    foreach (dec_line[i]) chk(dec_line[i] > 0, $sformatf("decoder line %0d never raised", i));
    chk(n_cout > 0,     "full adder carry out never occurred");
    chk(n_borrow > 0,   "full subtractor borrow never occurred");
    chk(n_eq > 0 && n_lt > 0 && n_gt > 0, "a comparator relation never occurred");
    chk(n_rca_cout > 0, "adder carry out never occurred");
    chk(n_dff_rst > 0 && n_dff_one > 0 && n_dff_zero > 0, "a flip-flop case never occurred");
    chk(n_sr_set > 0 && n_sr_reset > 0 && n_sr_both > 0, "an SR flip-flop case never occurred");
    chk(n_swap > 0,     "GCD swap never occurred");
    chk(n_sub > 0,      "GCD subtract never occurred");
    chk(n_done > 0,     "GCD done never occurred");
    $display("decoder lines all raised; carries=%0d borrows=%0d eq/lt/gt=%0d/%0d/%0d rca_cout=%0d",
             n_cout, n_borrow, n_eq, n_lt, n_gt, n_rca_cout);
    $display("dff resets=%0d ones=%0d zeros=%0d; gcd swaps=%0d subtracts=%0d done=%0d",
             n_dff_rst, n_dff_one, n_dff_zero, n_swap, n_sub, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
