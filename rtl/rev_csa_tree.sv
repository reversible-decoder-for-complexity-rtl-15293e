// Wallace reduction of R rows of WIDTH bits to their sum.
// At each level the rows are taken in groups of three and each group is
// reduced to two by a carry-save adder row (rev_csa); rows left over pass on
// unchanged. A level of r rows leaves 2*(r/3) + r%3, so 8 rows go
// 8 -> 6 -> 4 -> 3 -> 2 in four levels, and 9 rows go 9 -> 6 -> 4 -> 3 -> 2.
// The last two rows are added by the reversible ripple-carry adder (rev_rca),
// whose carry input is constant 0, so its lowest bit is a Peres half adder.
// The sum must fit in WIDTH bits.
// Interface: rows[R] of WIDTH bits in, total out. Purely combinational.
module rev_csa_tree #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned R     = 8
) (
  input  logic [WIDTH-1:0] rows [R],
  output logic [WIDTH-1:0] total
);
  function automatic int unsigned next_rows(int unsigned r);
    return (r <= 2) ? r : 2 * (r / 3) + r % 3;
  endfunction

  function automatic int unsigned rows_at(int unsigned lvl);
    int unsigned r = R;
    for (int unsigned i = 0; i < lvl; i++) r = next_rows(r);
    return r;
  endfunction

  function automatic int unsigned n_levels();
    int unsigned r = R, n = 0;
    while (r > 2) begin
      r = next_rows(r);
      n++;
    end
    return n;
  endfunction

  localparam int unsigned LV = n_levels();

  for (genvar l = 0; l < int'(LV); l++) begin : g_level
    localparam int unsigned NI = rows_at(l);
    localparam int unsigned NG = NI / 3;
    localparam int unsigned NO = 2 * NG + NI % 3;
    logic [WIDTH-1:0] cur [NI];
    logic [WIDTH-1:0] nxt [NO];
    if (l == 0) begin : g_first
      assign cur = rows;
    end else begin : g_chain
      assign cur = g_level[l-1].nxt;
    end
    for (genvar g = 0; g < int'(NG); g++) begin : g_csa
      rev_csa #(.WIDTH(WIDTH)) u_csa (
        .x(cur[3*g]), .y(cur[3*g+1]), .z(cur[3*g+2]),
        .s(nxt[2*g]), .c(nxt[2*g+1]));
    end
    for (genvar k = 0; k < int'(NI % 3); k++) begin : g_pass
      assign nxt[2*NG+k] = cur[3*NG+k];
    end
  end

  logic [WIDTH-1:0] op_a, op_b;
  if (LV == 0) begin : g_direct
    assign op_a = rows[0];
    if (R > 1) begin : g_two
      assign op_b = rows[1];
    end else begin : g_one
      assign op_b = '0;
    end
  end else begin : g_reduced
    assign op_a = g_level[LV-1].nxt[0];
    assign op_b = g_level[LV-1].nxt[1];
  end

  logic cout;
  rev_rca #(.WIDTH(WIDTH), .HALF_LSB(1'b1)) u_final (
    .a(op_a), .b(op_b), .cin(1'b0), .sum(total), .cout(cout));

  logic unused;
  assign unused = cout;
endmodule
