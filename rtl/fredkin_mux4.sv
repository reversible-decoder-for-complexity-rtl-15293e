// 4:1 multiplexer from three Fredkin gates used as 2:1 multiplexers
// (control = select, B = input for select 0, C = input for select 1, Q is
// the selected one). Two gates controlled by s0 pick within each pair, the
// s0 line passing from the first to the second through its control output;
// a third gate controlled by s1 picks between the pairs.
// Interface: v[3:0], s1, s0 in; y = v[{s1, s0}]. Purely combinational.
module fredkin_mux4 (
  input  logic [3:0] v,
  input  logic       s1,
  input  logic       s0,
  output logic       y
);
  logic s0_mid, s0_end, s1_end, lo, hi, r0, r1, r2;
  fredkin_gate u_lo (.a(s0),     .b(v[0]), .c(v[1]), .p(s0_mid), .q(lo), .r(r0));
  fredkin_gate u_hi (.a(s0_mid), .b(v[2]), .c(v[3]), .p(s0_end), .q(hi), .r(r1));
  fredkin_gate u_sl (.a(s1),     .b(lo),   .c(hi),   .p(s1_end), .q(y),  .r(r2));

  logic unused;
  assign unused = ^{s0_end, s1_end, r0, r1, r2};
endmodule
