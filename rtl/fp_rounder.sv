// fp_rounder: rounding stage shared by the floating-point adder and
// multiplier.
//
// Input is a result already normalised by the stage before it: a 24-bit
// mantissa (bit 23 is the hidden bit, 0 for a denormal), the round bit just
// below it, a sticky bit (OR of everything further down) and the biased
// exponent field (0 for a denormal, values of 255 and above mean the
// exponent is already out of range). The rounding increment is chosen from
// the 2-bit mode: nearest-even (00), toward zero (01), toward +inf (10),
// toward -inf (11). The increment is added to the packed {exponent, fraction}
// word, so a carry out of the fraction moves into the exponent by itself:
// a denormal that rounds up becomes the smallest normal and the largest
// finite value that rounds up becomes infinity.
//
// Overflow returns infinity or the largest finite value, as IEEE-754 gives
// for the mode; underflow is reported when the result is tiny before
// rounding and inexact (this design's choice of tininess rule).
// Purely combinational.
module fp_rounder
  import fp_pkg::*;
(
  input  logic        sign,
  input  logic [9:0]  exp_field,
  input  logic [23:0] mant,
  input  logic        rnd,
  input  logic        stk,
  input  rmode_e      rmode,
  output fp32_t       y,
  output logic        overflow,
  output logic        underflow,
  output logic        inexact
);

  logic        inc;
  logic        lost;
  logic [30:0] packed_in;
  logic [30:0] rounded;
  logic        to_inf;

  assign lost = rnd | stk;

  always_comb begin
    unique case (rmode)
      RM_RN:   inc = rnd & (stk | mant[0]);
      RM_RZ:   inc = 1'b0;
      RM_RP:   inc = ~sign & lost;
      default: inc = sign & lost;  // RM_RM
    endcase
  end

  assign packed_in = {exp_field[7:0], mant[22:0]};
  assign rounded   = packed_in + {30'b0, inc};

  // Overflow: exponent out of range before rounding, or rounding carried
  // into the all-ones exponent.
  assign overflow = (exp_field >= 10'd255) | (rounded[30:23] == 8'hFF);

  // Whether an overflowed result becomes infinity or the largest finite.
  always_comb begin
    unique case (rmode)
      RM_RN:   to_inf = 1'b1;
      RM_RZ:   to_inf = 1'b0;
      RM_RP:   to_inf = ~sign;
      default: to_inf = sign;
    endcase
  end

  always_comb begin
    y.sign = sign;
    if (overflow)
      {y.exp, y.frac} = to_inf ? INFINITY : MAXFINITE;
    else
      {y.exp, y.frac} = rounded;
  end

  assign inexact   = lost | overflow;
  assign underflow = ~mant[23] & lost;

endmodule
