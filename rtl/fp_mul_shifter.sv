// fp_mul_shifter: denormalising shifter of the floating-point multiplier.
//
// Input is the 48-bit product, already normalised so that bit 47 is 1, and
// its signed result exponent. When the exponent is 1 or more the product
// passes unchanged: mantissa = bits 47..24, round = bit 23, sticky = OR of
// bits 22..0. When it is below 1 the result is a denormal: the product is
// shifted right by 1 - exponent, the exponent field becomes 0, and every bit
// shifted past the round position joins the sticky bit. loss reports that
// the denormal result lost precision (round or sticky set after the shift).
// An exponent of 255 or more is passed through for the rounder to flag as
// overflow. The stage's task (shift when the exponent calls for it, report
// the precision lost) follows the design's specification; the widths and
// the sticky rule are this design's. Purely combinational.
module fp_mul_shifter (
  input  logic signed [10:0] exp_in,
  input  logic [47:0]        prod,
  output logic [9:0]         exp_field,
  output logic [23:0]        mant,
  output logic               rnd,
  output logic               stk,
  output logic               loss
);

  logic        denorm;
  logic [10:0] sh;
  logic [121:0] ext;  // product with 74 bits below it

  assign denorm = (exp_in < 11'sd1);
  assign sh     = denorm ? 11'(11'sd1 - exp_in) : 11'd0;
  assign ext    = (sh >= 11'd74) ? 122'd0 : ({prod, 74'd0} >> sh);

  always_comb begin
    if (denorm) begin
      exp_field = 10'd0;
      mant      = ext[121:98];
      rnd       = ext[97];
      stk       = (|ext[96:0]) | ((sh >= 11'd74) & (|prod));
    end else begin
      exp_field = exp_in[9:0];
      mant      = prod[47:24];
      rnd       = prod[23];
      stk       = |prod[22:0];
    end
  end

  assign loss = denorm & (rnd | stk);

endmodule
