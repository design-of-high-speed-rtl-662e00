// fp_align: alignment stage of the floating-point adder.
//
// The operand of larger magnitude (compared on {exponent, significand}) is
// passed on unchanged as the "big" operand; the other significand is shifted
// right by the exponent difference into a 26-bit field (24 significand bits
// plus guard and round positions). Every bit shifted further is ORed into
// presticky, which the mantissa adder appends as its least significant bit.
// Ordering the operands makes an effective subtraction always big - small,
// so the mantissa adder never produces a negative result. The swap and the
// 26+1-bit format are choices of this design. eff_sub is 1 when the signs
// differ (b's sign is the effective one, already flipped for subtraction).
// Purely combinational.
module fp_align (
  input  logic        sa,
  input  logic [7:0]  ea,
  input  logic [23:0] siga,
  input  logic        sb,
  input  logic [7:0]  eb,
  input  logic [23:0] sigb,
  output logic        big_sign,
  output logic [7:0]  big_exp,
  output logic [23:0] big_sig,
  output logic [25:0] small_sig,
  output logic        presticky,
  output logic        eff_sub
);

  logic        a_big;
  logic [7:0]  small_exp;
  logic [23:0] small_in;
  logic [7:0]  diff;
  logic [75:0] ext;  // small significand, guard/round, 50 bits below

  assign a_big     = {ea, siga} >= {eb, sigb};
  assign big_sign  = a_big ? sa   : sb;
  assign big_exp   = a_big ? ea   : eb;
  assign big_sig   = a_big ? siga : sigb;
  assign small_exp = a_big ? eb   : ea;
  assign small_in  = a_big ? sigb : siga;
  assign eff_sub   = sa ^ sb;
  assign diff      = big_exp - small_exp;

  assign ext = (diff >= 8'd50) ? 76'd0 : ({small_in, 52'd0} >> diff);

  assign small_sig = ext[75:50];
  assign presticky = (diff >= 8'd50) ? (|small_in) : (|ext[49:0]);

endmodule
