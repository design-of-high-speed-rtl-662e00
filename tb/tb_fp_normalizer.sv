// tb_fp_normalizer: self-checking testbench of fp_normalizer.
//
// Random 28-bit mantissa sums with random leading-zero counts and random
// exponents (many of them small, to reach the denormal clamp) are checked
// by invariants rather than by a copy of the algorithm: the output must
// encode the same value (sum * 2^exp_big == {mant, round, 2 low bits} *
// 2^exponent), be normalised unless the exponent reached its minimum, mark
// a denormal by exponent field 0, and fold the lowest bits into sticky.
module tb_fp_normalizer;
  logic [27:0] sum;
  logic [7:0]  exp_big;
  logic [9:0]  exp_field;
  logic [23:0] mant;
  logic        rnd, stk, zero, inexact;
  int checks = 0, failures = 0;

  fp_normalizer dut (.sum(sum), .exp_big(exp_big), .exp_field(exp_field), .mant(mant),
                     .rnd(rnd), .stk(stk), .zero(zero), .inexact(inexact));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int eo, s;
      logic [63:0] sh;
      sum = 28'($urandom) >> $urandom_range(0, 28);
      exp_big = (i % 3 == 0) ? 8'($urandom_range(1, 30)) : 8'($urandom_range(1, 254));
      #1;
      checks++;
      if (zero !== (sum == 0) || inexact !== (rnd | stk)) failures++;
      checks++;
      if (sum[27]) begin
        if (exp_field !== 10'(exp_big) + 10'd1 || {mant, rnd} !== sum[27:3] || stk !== |sum[2:0])
          failures++;
      end else if (sum != 0) begin
        eo = (exp_field == 0) ? 1 : int'(exp_field);
        s  = int'(exp_big) - eo;
        sh = 64'(sum[26:0]) << s;
        if (s < 0 || sh[63:27] != 0 || {mant, rnd} !== sh[26:2] || stk !== |sh[1:0] ||
            (!mant[23] && eo != 1) || ((exp_field == 0) !== !mant[23])) begin
          failures++;
          if (failures < 10) $display("FAIL sum=%h e=%0d -> %0d %h", sum, exp_big, exp_field, mant);
        end
      end else if (mant != 0 || rnd || stk) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
