// fp_normalizer: normalisation stage of the floating-point adder.
//
// Input is the 28-bit mantissa sum: bit 27 the carry of an addition, bits
// 26..3 the mantissa, bit 2 guard, bit 1 round, bit 0 the presticky bit,
// together with the exponent of the larger operand. A carry shifts the sum
// right by one and raises the exponent. Otherwise a leading-one detector
// counts the zeros above the first 1 and the sum is shifted left by that
// count, but by no more than exponent-1: a result that would fall below the
// normal range stops at exponent 1 with a 0 hidden bit and leaves with
// exponent field 0, i.e. as a denormal. The outputs are the 24-bit
// mantissa, round bit, sticky bit (OR of all lower bits), the exponent field
// for the rounder, and whether the sum is zero or inexact. The tasks of the
// stage follow the design's specification; the 28-bit sum format and the
// shift clamp are this design's way of doing them. Purely combinational.
module fp_normalizer (
  input  logic [27:0] sum,
  input  logic [7:0]  exp_big,
  output logic [9:0]  exp_field,
  output logic [23:0] mant,
  output logic        rnd,
  output logic        stk,
  output logic        zero,
  output logic        inexact
);

  logic [4:0]  lz;
  logic [7:0]  sh;
  logic [26:0] shifted;

  // Leading-zero count of sum[26:0] (27 when all zero).
  always_comb begin
    lz = 5'd27;
    for (int i = 0; i <= 26; i++)
      if (sum[i]) lz = 5'(26 - i);
  end

  assign sh      = ({3'b0, lz} < exp_big) ? {3'b0, lz} : (exp_big - 8'd1);
  assign shifted = sum[26:0] << sh;

  always_comb begin
    if (sum[27]) begin
      mant      = sum[27:4];
      rnd       = sum[3];
      stk       = |sum[2:0];
      exp_field = {2'b0, exp_big} + 10'd1;
    end else begin
      mant      = shifted[26:3];
      rnd       = shifted[2];
      stk       = |shifted[1:0];
      exp_field = shifted[26] ? ({2'b0, exp_big} - {2'b0, sh}) : 10'd0;
    end
  end

  assign zero    = (sum == '0);
  assign inexact = rnd | stk;

endmodule
