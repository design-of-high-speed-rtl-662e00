// fp_preprocessor: first stage of both the floating-point adder and the
// floating-point multiplier.
//
// It unpacks a binary32 operand into sign, effective biased exponent and
// 24-bit significand with the hidden bit made explicit, and classifies the
// operand as NaN, infinity, zero or denormal. A denormal gets effective
// exponent 1 and hidden bit 0, so that its value is sig * 2^(exp_eff-150)
// like any normal number (IEEE-754 convention, chosen by this design).
// Purely combinational.
module fp_preprocessor
  import fp_pkg::*;
(
  input  fp32_t       x,
  output logic        sign,
  output logic [7:0]  exp_eff,
  output logic [23:0] sig,
  output fp_class_t   cls
);

  logic exp_zero, exp_ones, frac_zero;

  assign exp_zero  = (x.exp == 8'h00);
  assign exp_ones  = (x.exp == 8'hFF);
  assign frac_zero = (x.frac == '0);

  assign sign    = x.sign;
  assign exp_eff = exp_zero ? 8'd1 : x.exp;
  assign sig     = {~exp_zero, x.frac};

  assign cls.nan    = exp_ones & ~frac_zero;
  assign cls.inf    = exp_ones &  frac_zero;
  assign cls.zero   = exp_zero &  frac_zero;
  assign cls.denorm = exp_zero & ~frac_zero;

endmodule
