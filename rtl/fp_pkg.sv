// fp_pkg: types and constants shared by the single-precision floating-point
// multiply-accumulate datapath.
//
// fp32_t is an IEEE-754 binary32 word split into sign, biased exponent and
// fraction. rmode_e is the 2-bit rounding-mode control (00 nearest-even,
// 01 toward zero, 10 toward +inf, 11 toward -inf), the encoding the design
// is specified with. fp_flags_t is the 5-bit exception word that the
// multiplier and the adder both produce; its bit order
// {invalid, infinity, overflow, underflow, inexact} is a choice of this
// design. fp_class_t is the operand classification made by the
// pre-processor stage.
package fp_pkg;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] frac;
  } fp32_t;

  typedef enum logic [1:0] {
    RM_RN = 2'b00,  // round to nearest, ties to even
    RM_RZ = 2'b01,  // round toward zero
    RM_RP = 2'b10,  // round toward +infinity
    RM_RM = 2'b11   // round toward -infinity
  } rmode_e;

  typedef struct packed {
    logic invalid;    // result is NaN (NaN operand, inf-inf, inf*0)
    logic infinity;   // result is an infinity
    logic overflow;   // rounded result exceeded the finite range
    logic underflow;  // result tiny before rounding and inexact
    logic inexact;    // rounded result differs from the exact one
  } fp_flags_t;

  typedef struct packed {
    logic nan;
    logic inf;
    logic zero;
    logic denorm;
  } fp_class_t;

  localparam int unsigned BIAS      = 127;
  localparam logic [31:0] QNAN      = 32'h7FC0_0000;
  localparam logic [30:0] MAXFINITE = 31'h7F7F_FFFF;
  localparam logic [30:0] INFINITY  = 31'h7F80_0000;

endpackage
