// fp_multiplier: IEEE-754 single-precision multiplier.
//
// Seven stages in one combinational path:
//   1. pre-processor (x2)   classify the operands, make the hidden bit explicit
//   2. pre-normalizer (x2)  shift denormal significands up to a leading 1
//   3. multiplier           24x24 Vedic (Urdhva-Tiryakbhyam) multiplier;
//                           bit 47 of the product marks a carry into a
//                           second integer bit
//   4. exponenter           e = ea + eb - 127, plus 1 when bit 47 is set
//   5. shifter              right shift into a denormal when e < 1
//   6. rounder              mode-dependent rounding (00 RN, 01 RZ, 10 RP,
//                           11 RM), final exponent
//   7. flagger              NaN / infinity / zero cases and the flags
// y = a * b; flags = {invalid, infinity, overflow, underflow, inexact}.
//
// The stage list, the exponent formula and the mode encoding follow the
// design's specification. Choices of this design: NaN operands and inf * 0
// give the quiet NaN 0x7FC00000 with invalid set; tininess is detected
// before rounding; the flag bit order.
module fp_multiplier
  import fp_pkg::*;
#(
  parameter int unsigned SPARSITY = 2
) (
  input  fp32_t     a,
  input  fp32_t     b,
  input  rmode_e    rmode,
  output fp32_t     y,
  output fp_flags_t flags
);

  // 1. pre-processing
  logic        sa, sb, sy;
  logic [7:0]  ea, eb;
  logic [23:0] siga, sigb;
  fp_class_t   ca, cb;

  fp_preprocessor u_pre_a (.x(a), .sign(sa), .exp_eff(ea), .sig(siga), .cls(ca));
  fp_preprocessor u_pre_b (.x(b), .sign(sb), .exp_eff(eb), .sig(sigb), .cls(cb));

  assign sy = sa ^ sb;

  // Denormal operands are handled by the pre-normalizer, not by a flag.
  logic unused_cls;
  assign unused_cls = ca.denorm ^ cb.denorm;

  // 2. pre-normalization
  logic [23:0]       siga_n, sigb_n;
  logic signed [9:0] ea_n, eb_n;

  fp_prenormalizer u_pn_a (.sig(siga), .exp_eff(ea), .sig_n(siga_n), .exp_n(ea_n));
  fp_prenormalizer u_pn_b (.sig(sigb), .exp_eff(eb), .sig_n(sigb_n), .exp_n(eb_n));

  // 3. significand multiplier
  logic [47:0] prod, prod_n;

  vedic_multiplier #(.N(24), .SPARSITY(SPARSITY)) u_vedic (.a(siga_n), .b(sigb_n), .p(prod));

  assign prod_n = prod[47] ? prod : {prod[46:0], 1'b0};

  // 4. exponenter
  logic signed [10:0] e_res;

  assign e_res = 11'(ea_n) + 11'(eb_n) - 11'(BIAS) + {10'd0, prod[47]};

  // 5. shifter
  logic [9:0]  s_exp;
  logic [23:0] s_mant;
  logic        s_rnd, s_stk, s_loss;

  fp_mul_shifter u_shift (
    .exp_in(e_res), .prod(prod_n), .exp_field(s_exp), .mant(s_mant),
    .rnd(s_rnd), .stk(s_stk), .loss(s_loss)
  );

  // 6. rounder
  fp32_t r_y;
  logic  r_ovf, r_unf, r_inx;

  fp_rounder u_round (
    .sign(sy), .exp_field(s_exp), .mant(s_mant), .rnd(s_rnd), .stk(s_stk),
    .rmode(rmode), .y(r_y), .overflow(r_ovf), .underflow(r_unf), .inexact(r_inx)
  );

  // 7. flagger
  always_comb begin
    flags = '0;
    if (ca.nan || cb.nan || (ca.inf && cb.zero) || (ca.zero && cb.inf)) begin
      y             = QNAN;
      flags.invalid = 1'b1;
    end else if (ca.inf || cb.inf) begin
      y = {sy, INFINITY};
    end else if (ca.zero || cb.zero) begin
      y = {sy, 31'd0};
    end else begin
      y               = r_y;
      flags.overflow  = r_ovf;
      flags.underflow = s_loss;
      flags.inexact   = r_inx;
    end
    flags.infinity = (y.exp == 8'hFF) && (y.frac == '0);
  end

  // The shifter's loss output is the underflow condition (a tiny result
  // that is inexact); the rounder's copy of it is not needed here.
  logic unused_r_unf;
  assign unused_r_unf = r_unf;

endmodule
