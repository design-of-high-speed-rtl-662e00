// fp_prenormalizer: pre-normalisation stage of the floating-point
// multiplier.
//
// A normal significand arrives with its hidden 1 already in bit 23 and
// passes unchanged. A denormal one (hidden bit 0) is shifted left by its
// leading-zero count so that its first 1 reaches bit 23, and the exponent is
// lowered by the same count; the exponent output is therefore signed and
// 10 bits wide (it reaches -22 for the smallest denormal). A zero
// significand comes out as zero; the multiplier treats zero operands as a
// special case. The stage's task follows the design's specification; the
// signed 10-bit exponent is this design's choice. Purely combinational.
module fp_prenormalizer (
  input  logic [23:0]       sig,
  input  logic [7:0]        exp_eff,
  output logic [23:0]       sig_n,
  output logic signed [9:0] exp_n
);

  logic [4:0] lz;

  always_comb begin
    lz = 5'd24;
    for (int i = 0; i <= 23; i++)
      if (sig[i]) lz = 5'(23 - i);
  end

  assign sig_n = sig << lz;
  assign exp_n = $signed({2'b0, exp_eff}) - $signed({5'b0, lz});

endmodule
