// fp_mac: single-precision floating-point multiply-accumulate unit.
//
// The product mul_a * mul_b from the Vedic-multiplier based floating-point
// multiplier is added by the Kogge-Stone based floating-point adder to the
// accumulator register, whose output is fed back as the adder's other
// operand. On every clock with en = 1 the register takes acc + a*b; the
// multiply-add path is combinational, so one accumulate completes per
// clock and acc_out shows it one clock after the operands are applied.
// mul_flags and add_flags ({invalid, infinity, overflow, underflow,
// inexact}) are registered with the accumulator and describe the operation
// that produced acc_out.
//
// Overflow handling: with SATURATE = 1, an overflow reported by the
// multiplier or by the accumulate adder loads the largest finite magnitude
// with the sign of the result instead of an infinity, so that a long run of
// accumulations clips rather than wraps or runs off to infinity. NaN results
// are never replaced.
//
// rst is synchronous and active high and clears the accumulator to +0.0 and
// both flag registers. The structure (multiplier, accumulate adder, feedback
// register) and the clipping to the largest value follow the design's
// specification; the reset style, the registered flags, the shared rounding
// mode and applying the clipping to floating-point overflow are this
// design's choices.
module fp_mac
  import fp_pkg::*;
#(
  parameter bit          SATURATE = 1'b1,
  parameter int unsigned SPARSITY = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [1:0]  rmode,
  input  logic [31:0] mul_a,
  input  logic [31:0] mul_b,
  output logic [31:0] acc_out,
  output logic [4:0]  mul_flags,
  output logic [4:0]  add_flags
);

  fp32_t     acc_q, prod, sum, acc_d;
  fp_flags_t mflags, aflags, mflags_q, aflags_q;
  rmode_e    mode;

  assign mode = rmode_e'(rmode);

  fp_multiplier #(.SPARSITY(SPARSITY)) u_mul (
    .a(fp32_t'(mul_a)), .b(fp32_t'(mul_b)), .rmode(mode), .y(prod), .flags(mflags)
  );

  fp_adder #(.SPARSITY(SPARSITY)) u_add (
    .a(acc_q), .b(prod), .sub(1'b0), .rmode(mode), .y(sum), .flags(aflags)
  );

  always_comb begin
    acc_d = sum;
    if (SATURATE && (mflags.overflow || aflags.overflow) && !aflags.invalid)
      acc_d = {sum.sign, MAXFINITE};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_q    <= '0;
      mflags_q <= '0;
      aflags_q <= '0;
    end else if (en) begin
      acc_q    <= acc_d;
      mflags_q <= mflags;
      aflags_q <= aflags;
    end
  end

  // Register rules: reset clears everything, a cycle without enable holds.
  a_reset_clears: assert property (@(posedge clk)
    rst |=> (acc_q == '0 && mflags_q == '0 && aflags_q == '0));
  a_hold: assert property (@(posedge clk) disable iff (rst)
    !en |=> ($stable(acc_q) && $stable(mflags_q) && $stable(aflags_q)));

  assign acc_out   = acc_q;
  assign mul_flags = mflags_q;
  assign add_flags = aflags_q;

endmodule
