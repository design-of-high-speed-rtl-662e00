// fp_adder: IEEE-754 single-precision adder/subtractor.
//
// Six stages in one combinational path:
//   1. pre-processor (x2)  classify the operands, make the hidden bit explicit
//   2. alignment           order by magnitude, shift the smaller significand
//   3. mantissa adder      28-bit sparse Kogge-Stone add or subtract of
//                          {0, big, guard, round, 0} and
//                          {0, small, guard, round, presticky}
//   4. normalizer          leading-one shift, denormal clamp, round/sticky
//   5. rounder             mode-dependent rounding, final exponent, overflow
//   6. finalizer           NaN / infinity / zero special cases and the flags
// y = a + b (sub = 0) or a - b (sub = 1), rounded in the mode rmode
// (00 RN, 01 RZ, 10 RP, 11 RM); denormal operands and results are handled.
// flags = {invalid, infinity, overflow, underflow, inexact}.
//
// The stage list and the Kogge-Stone mantissa adder follow the design's
// specification. Choices of this design: any NaN (and inf - inf) returns the
// quiet NaN 0x7FC00000 with invalid set; an exact zero from operands of
// opposite effective sign is +0 (-0 in RM); the flag bit order.
module fp_adder
  import fp_pkg::*;
#(
  parameter int unsigned SPARSITY = 2
) (
  input  fp32_t     a,
  input  fp32_t     b,
  input  logic      sub,
  input  rmode_e    rmode,
  output fp32_t     y,
  output fp_flags_t flags
);

  // 1. pre-processing
  logic        sa, sb, sb_eff;
  logic [7:0]  ea, eb;
  logic [23:0] siga, sigb;
  fp_class_t   ca, cb;

  fp_preprocessor u_pre_a (.x(a), .sign(sa), .exp_eff(ea), .sig(siga), .cls(ca));
  fp_preprocessor u_pre_b (.x(b), .sign(sb), .exp_eff(eb), .sig(sigb), .cls(cb));

  assign sb_eff = sb ^ sub;

  // Zero and denormal operands need no special case in the adder.
  logic unused_cls;
  assign unused_cls = ^{ca.zero, ca.denorm, cb.zero, cb.denorm};

  // 2. alignment
  logic        big_sign, presticky, eff_sub;
  logic [7:0]  big_exp;
  logic [23:0] big_sig;
  logic [25:0] small_sig;

  fp_align u_align (
    .sa(sa), .ea(ea), .siga(siga), .sb(sb_eff), .eb(eb), .sigb(sigb),
    .big_sign(big_sign), .big_exp(big_exp), .big_sig(big_sig),
    .small_sig(small_sig), .presticky(presticky), .eff_sub(eff_sub)
  );

  // 3. mantissa adder: big + small, or big + ~small + 1
  logic [27:0] op_big, op_small, op_small_x, msum;
  logic        unused_cout;

  assign op_big     = {1'b0, big_sig, 3'b000};
  assign op_small   = {1'b0, small_sig, presticky};
  assign op_small_x = eff_sub ? ~op_small : op_small;

  kogge_stone_adder #(.W(28), .SPARSITY(SPARSITY)) u_mant_add (
    .a(op_big), .b(op_small_x), .cin(eff_sub), .sum(msum), .cout(unused_cout)
  );

  // 4. normalizer
  logic [9:0]  n_exp;
  logic [23:0] n_mant;
  logic        n_rnd, n_stk, n_zero, n_inexact;

  fp_normalizer u_norm (
    .sum(msum), .exp_big(big_exp), .exp_field(n_exp), .mant(n_mant),
    .rnd(n_rnd), .stk(n_stk), .zero(n_zero), .inexact(n_inexact)
  );

  // 5. rounder
  fp32_t r_y;
  logic  r_ovf, r_unf, r_inx;

  fp_rounder u_round (
    .sign(big_sign), .exp_field(n_exp), .mant(n_mant), .rnd(n_rnd), .stk(n_stk),
    .rmode(rmode), .y(r_y), .overflow(r_ovf), .underflow(r_unf), .inexact(r_inx)
  );

  // 6. finalizer
  always_comb begin
    flags = '0;
    if (ca.nan || cb.nan || (ca.inf && cb.inf && eff_sub)) begin
      y             = QNAN;
      flags.invalid = 1'b1;
    end else if (ca.inf) begin
      y = {sa, INFINITY};
    end else if (cb.inf) begin
      y = {sb_eff, INFINITY};
    end else if (n_zero) begin
      y = {eff_sub ? (rmode == RM_RM) : sa, 31'd0};
    end else begin
      y               = r_y;
      flags.overflow  = r_ovf;
      flags.underflow = r_unf;
      flags.inexact   = n_inexact | r_ovf;
    end
    flags.infinity = (y.exp == 8'hFF) && (y.frac == '0);
  end

  // The rounder's own inexact output is the same condition.
  logic unused_r_inx;
  assign unused_r_inx = r_inx;

endmodule
