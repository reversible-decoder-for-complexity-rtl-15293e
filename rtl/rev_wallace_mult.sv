// Reversible N x N unsigned Wallace tree multiplier.
// Partial products: an N x N grid of Toffoli gates with the target tied to 0
// forms a[i] AND b[j]. Multiplicand bit a[i] travels down its column and
// multiplier bit b[j] along its row through the gates' pass-through outputs,
// so no input bit drives more than one gate. Bit a[i]b[j] has weight i + j.
// Summation, column by column (classic Wallace): at every stage each column
// of height h gets h/3 TSG full adders and, if two bits are left over, one
// Peres half adder; sums stay in the column, carries move to the next one,
// and remaining bits pass unchanged. Stages repeat until no column holds
// more than two bits (for 8 x 8: heights 8 -> 6 -> 4 -> 3 -> 2). The two
// remaining rows are added by a TSG ripple-carry adder whose lowest bit is a
// Peres half adder. The plan of every stage (column heights, gate counts,
// where each bit goes) is computed at elaboration by the functions below.
// The gate types (Toffoli partial products, TSG full adders, Peres half
// adders) and the 8 x 8 default follow the document; the Wallace allocation
// rule and the final adder are this design's.
// Interface: a, b in; p = a * b out (2N bits). Purely combinational.
module rev_wallace_mult #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned C = 2 * N;    // columns
  localparam int unsigned H = N;        // tallest column, never exceeded

  // height of column c before stage s
  function automatic int unsigned height(int unsigned s, int unsigned c);
    int unsigned h [C];
    int unsigned nh [C];
    for (int unsigned k = 0; k < C; k++) h[k] = (k < N) ? k + 1 : ((k < 2 * N - 1) ? 2 * N - 1 - k : 0);
    if (c >= C || s > C) return 0;   // out of range: no such column or stage
    for (int unsigned t = 0; t < s; t++) begin
      for (int unsigned k = 0; k < C; k++) nh[k] = h[k] - 2 * (h[k] / 3) - ((h[k] % 3 == 2) ? 1 : 0);
      for (int unsigned k = 1; k < C; k++) nh[k] += h[k-1] / 3 + ((h[k-1] % 3 == 2) ? 1 : 0);
      h = nh;
    end
    return h[c];
  endfunction

  function automatic int unsigned n_fa(int unsigned s, int unsigned c);
    return height(s, c) / 3;
  endfunction

  function automatic int unsigned n_ha(int unsigned s, int unsigned c);
    return (height(s, c) % 3 == 2) ? 1 : 0;
  endfunction

  function automatic int unsigned n_stages();
    int unsigned s = 0;
    forever begin
      int unsigned mx = 0;
      for (int unsigned k = 0; k < C; k++) if (height(s, k) > mx) mx = height(s, k);
      if (mx <= 2) break;
      s++;
    end
    return s;
  endfunction

  localparam int unsigned S = n_stages();

  // partial products
  logic [N-1:0] a_l [N+1];
  logic [N-1:0] b_l [N+1];
  logic [N-1:0] pp  [N];      // pp[j][i] = a[i] & b[j]
  assign a_l[0] = a;
  assign b_l[0] = b;
  for (genvar j = 0; j < int'(N); j++) begin : g_row
    for (genvar i = 0; i < int'(N); i++) begin : g_col
      toffoli_gate u_tf (.a(a_l[j][i]), .b(b_l[i][j]), .c(1'b0),
                         .p(a_l[j+1][i]), .q(b_l[i+1][j]), .r(pp[j][i]));
    end
  end

  // stage s holds col[c][0 .. height(s, c) - 1]; unused positions are 0
  for (genvar s = 0; s <= int'(S); s++) begin : g_stage
    logic [H-1:0] col [C];
    if (s == 0) begin : g_init
      for (genvar c = 0; c < int'(C); c++) begin : g_c
        for (genvar k = 0; k < int'(H); k++) begin : g_k
          // column c holds pp[j][c-j] for the valid j in increasing order
          localparam int J0 = (c < int'(N)) ? 0 : c - int'(N) + 1;
          if (k < int'(height(0, c))) begin : g_bit
            assign col[c][k] = pp[J0 + k][c - J0 - k];
          end else begin : g_zero
            assign col[c][k] = 1'b0;
          end
        end
      end
    end else begin : g_reduce
      for (genvar c = 0; c < int'(C); c++) begin : g_c
        localparam int unsigned HP  = height(s - 1, c);
        localparam int unsigned FA  = n_fa(s - 1, c);
        localparam int unsigned HA  = n_ha(s - 1, c);
        localparam int unsigned PS  = HP - 3 * FA - 2 * HA;        // passed bits
        localparam int unsigned CIN = (c > 0) ? n_fa(s - 1, c - 1) + n_ha(s - 1, c - 1) : 0;
        localparam int unsigned HN  = FA + HA + PS + CIN;
        // layout of the new column: FA sums, HA sum, passed bits, carries in
        logic [FA+HA:0] carry_out;                                  // to column c + 1
        for (genvar f = 0; f < int'(FA); f++) begin : g_fa
          logic unused_gp, unused_gq;
          tsg_gate u_fa (.a(g_stage[s-1].col[c][3*f]), .b(g_stage[s-1].col[c][3*f+1]),
                         .c(1'b0), .d(g_stage[s-1].col[c][3*f+2]),
                         .p(unused_gp), .q(unused_gq), .r(col[c][f]), .s(carry_out[f]));
        end
        if (HA == 1) begin : g_ha
          logic unused_gp;
          peres_gate u_ha (.a(g_stage[s-1].col[c][3*FA]), .b(g_stage[s-1].col[c][3*FA+1]),
                           .c(1'b0), .p(unused_gp), .q(col[c][FA]), .r(carry_out[FA]));
        end
        assign carry_out[FA+HA] = 1'b0;                            // spare position
        logic unused_pad;
        assign unused_pad = carry_out[FA+HA];
        if (c == int'(C) - 1) begin : g_top
          // carries out of the top column would weigh 2^(2N): always 0
          logic unused_top;
          assign unused_top = ^carry_out;
        end
        for (genvar k = 0; k < int'(PS); k++) begin : g_pass
          assign col[c][FA+HA+k] = g_stage[s-1].col[c][3*FA+2*HA+k];
        end
        if (c > 0) begin : g_cin
          for (genvar k = 0; k < int'(CIN); k++) begin : g_k
            assign col[c][FA+HA+PS+k] = g_stage[s].g_reduce.g_c[c-1].carry_out[k];
          end
        end
        for (genvar k = HN; k < int'(H); k++) begin : g_zero
          assign col[c][k] = 1'b0;
        end
      end
    end
  end

  // final two rows
  logic [C-1:0] row0, row1;
  for (genvar c = 0; c < int'(C); c++) begin : g_final
    assign row0[c] = g_stage[S].col[c][0];
    assign row1[c] = g_stage[S].col[c][1];
  end

  logic cout;
  rev_rca #(.WIDTH(C), .HALF_LSB(1'b1)) u_final (
    .a(row0), .b(row1), .cin(1'b0), .sum(p), .cout(cout));

  logic unused;
  assign unused = ^{a_l[N], b_l[N], cout};
endmodule
