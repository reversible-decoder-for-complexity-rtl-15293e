// Reversible-logic circuit collection: all circuits side by side.
// The circuits are independent of one another; each brings its own ports
// out under a prefix:
//   dec_*  4-to-16 reversible decoder (Feynman + Fredkin gates)
//   fas_*  full adder / full subtractor on a 3-to-8 reversible decoder
//   mux_*  4-to-1 multiplexer on a 2-to-4 reversible decoder
//   cmp_*  2-bit comparator on a 4-to-16 reversible decoder
//   rca_*  8-bit ripple-carry adder of TSG gates
//   mul_*  8 x 8 Wallace tree multiplier (Toffoli partial products, TSG adders)
//   m24_*  24 x 24 multiplier from nine 8 x 8 Wallace multipliers
//   dff_*  reversible master-slave D flip-flop (captures at the falling edge)
//   sr_*   reversible clocked SR flip-flop (transparent while clk is high)
//   gcd_*  control unit of a subtract-compare-swap GCD processor; its
//          datapath is outside this design and connects to the gcd_ ports
//   irr_*  the conventional (irreversible) circuits the reversible ones are
//          measured against: an 8-bit ripple-carry adder on the rca_
//          inputs, an 8 x 8 Wallace multiplier on the mul_ inputs and a GCD
//          control unit on the gcd_ inputs and clock; their
//          outputs equal those of the reversible circuits at all times
// Everything except the flip-flops and the GCD control units is purely
// combinational. The D flip-flop and the control units share clk and rst;
// they change state at the falling edge of clk, rst is synchronous and
// active high. The SR flip-flop uses clk as its enable and has no reset.
module reversible_top (
  input  logic        clk,
  input  logic        rst,
  // decoder
  input  logic [3:0]  dec_in,
  output logic [15:0] dec_out,
  // full adder / subtractor
  input  logic        fas_a,
  input  logic        fas_b,
  input  logic        fas_cin,
  output logic        fas_s,
  output logic        fas_cout,
  output logic        fas_borrow,
  // multiplexer
  input  logic [3:0]  mux_d,
  input  logic [1:0]  mux_sel,
  output logic        mux_y,
  // comparator
  input  logic [1:0]  cmp_a,
  input  logic [1:0]  cmp_b,
  output logic        cmp_equal,
  output logic        cmp_less,
  output logic        cmp_greater,
  // ripple-carry adder
  input  logic [7:0]  rca_a,
  input  logic [7:0]  rca_b,
  input  logic        rca_cin,
  output logic [7:0]  rca_sum,
  output logic        rca_cout,
  output logic [7:0]  irr_rca_sum,
  output logic        irr_rca_cout,
  // Wallace multiplier
  input  logic [7:0]  mul_a,
  input  logic [7:0]  mul_b,
  output logic [15:0] mul_p,
  output logic [15:0] irr_mul_p,
  // 24 x 24 multiplier
  input  logic [23:0] m24_a,
  input  logic [23:0] m24_b,
  output logic [47:0] m24_p,
  // D flip-flop
  input  logic        dff_d,
  output logic        dff_q,
  output logic        dff_q_bar,
  // SR flip-flop
  input  logic        sr_s,
  input  logic        sr_r,
  output logic        sr_q,
  output logic        sr_qbar,
  // GCD control unit
  input  logic        gcd_start,
  input  logic        gcd_eq,
  input  logic        gcd_lt,
  output logic        gcd_load,
  output logic        gcd_swap,
  output logic        gcd_sub,
  output logic        gcd_done,
  output logic        irr_gcd_load,
  output logic        irr_gcd_swap,
  output logic        irr_gcd_sub,
  output logic        irr_gcd_done
);
  rev_decoder      u_dec (.in(dec_in), .out(dec_out));

  rev_full_add_sub u_fas (.a(fas_a), .b(fas_b), .cin(fas_cin),
                          .s(fas_s), .cout(fas_cout), .borrow(fas_borrow));

  rev_mux          u_mux (.d(mux_d), .sel(mux_sel), .y(mux_y));

  rev_comparator   u_cmp (.a(cmp_a), .b(cmp_b), .equal(cmp_equal),
                          .less(cmp_less), .greater(cmp_greater));

  rev_rca          u_rca (.a(rca_a), .b(rca_b), .cin(rca_cin),
                          .sum(rca_sum), .cout(rca_cout));

  rev_wallace_mult u_mul (.a(mul_a), .b(mul_b), .p(mul_p));

  rev_mult24       u_m24 (.a(m24_a), .b(m24_b), .p(m24_p));

  logic dff_q_copy;
  rev_dff          u_dff (.clk(clk), .rst(rst), .d(dff_d),
                          .q(dff_q), .q_bar(dff_q_bar), .q_copy(dff_q_copy));

  rev_srff         u_sr  (.clk(clk), .s(sr_s), .r(sr_r), .q(sr_q), .qbar(sr_qbar));

  gcd_control_unit u_gcd (.clk(clk), .rst(rst), .start(gcd_start),
                          .eq(gcd_eq), .lt(gcd_lt), .load(gcd_load),
                          .swap(gcd_swap), .sub(gcd_sub), .done(gcd_done));

  irr_rca          u_irr_rca (.a(rca_a), .b(rca_b), .cin(rca_cin),
                              .sum(irr_rca_sum), .cout(irr_rca_cout));

  irr_wallace_mult u_irr_mul (.a(mul_a), .b(mul_b), .p(irr_mul_p));

  irr_gcd_control_unit u_irr_gcd (.clk(clk), .rst(rst), .start(gcd_start),
                                  .eq(gcd_eq), .lt(gcd_lt), .load(irr_gcd_load),
                                  .swap(irr_gcd_swap), .sub(irr_gcd_sub),
                                  .done(irr_gcd_done));

  logic unused;
  assign unused = dff_q_copy;
endmodule
