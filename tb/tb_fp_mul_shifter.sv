// tb_fp_mul_shifter: self-checking testbench of fp_mul_shifter.
//
// Random normalised products (bit 47 set) with exponents from well below
// the denormal range to above the overflow limit. For exponents of 1 or
// more the product must pass unchanged; below 1 the expected mantissa and
// round bit are the product divided by 2^(1 - e + 23) in a 256-bit integer,
// sticky is the remainder being non-zero, and loss is round or sticky.
module tb_fp_mul_shifter;
  logic signed [10:0] exp_in;
  logic [47:0]        prod;
  logic [9:0]         exp_field;
  logic [23:0]        mant;
  logic               rnd, stk, loss;
  int checks = 0, failures = 0;

  fp_mul_shifter dut (.exp_in(exp_in), .prod(prod), .exp_field(exp_field), .mant(mant),
                      .rnd(rnd), .stk(stk), .loss(loss));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int e, sh;
      logic [255:0] p, q, r;
      e = (i % 2 != 0) ? $urandom_range(0, 120) - 100 : $urandom_range(0, 400) - 20;
      exp_in = 11'(e);
      prod = {1'b1, 47'({$urandom, $urandom})};
      if (i % 7 == 0) prod[30:0] = '0;
      #1;
      checks++;
      if (e >= 1) begin
        if (exp_field !== 10'(e) || mant !== prod[47:24] || rnd !== prod[23] ||
            stk !== |prod[22:0] || loss) failures++;
      end else begin
        sh = 1 - e + 23;
        p = 256'(prod);
        q = p >> sh;
        r = p & ((256'(1) << sh) - 1);
        if (exp_field !== 0 || {mant, rnd} !== q[24:0] || stk !== (r != 0) ||
            loss !== (rnd | stk)) begin
          failures++;
          if (failures < 10) $display("FAIL e=%0d prod=%h", e, prod);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
