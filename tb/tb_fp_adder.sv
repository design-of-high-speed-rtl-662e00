// tb_fp_adder: self-checking testbench of fp_adder.
//
// Drives directed cases (Figure-style integer sums, cancellation to zero,
// inf - inf, NaN, overflow, denormal results) and random operands biased
// toward special classes, in all four rounding modes and both operations,
// and compares result and flags with the exact-integer reference model of
// fp_ref_pkg. The adder is combinational; each
// vector is checked 1 ns after it is applied.
module tb_fp_adder;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  logic        sub;
  logic [1:0]  rmode;
  logic [4:0]  flags;
  int checks = 0, failures = 0;

  fp_adder dut (.a(a), .b(b), .sub(sub), .rmode(fp_pkg::rmode_e'(rmode)), .y(y), .flags(flags));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic ts,
                       input logic [1:0] tm);
    logic [31:0] exp_y;
    logic [4:0]  exp_f;
    a = ta; b = tb_; sub = ts; rmode = tm;
    #1;
    exp_y = ref_add(ta, tb_, ts, tm, exp_f);
    checks++;
    if (y !== exp_y || flags !== exp_f) begin
      failures++;
      if (failures < 10)
        $display("FAIL add a=%h b=%h sub=%0d mode=%0d: got %h/%b expected %h/%b",
                 ta, tb_, ts, tm, y, flags, exp_y, exp_f);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 1.0 + 1.0, 2.0 + 1.0, 3.0 + 1.0, 4.0 + 1.0
    check(32'h3F80_0000, 32'h3F80_0000, 0, 0);
    check(32'h4000_0000, 32'h3F80_0000, 0, 0);
    check(32'h4040_0000, 32'h3F80_0000, 0, 0);
    check(32'h4080_0000, 32'h3F80_0000, 0, 0);
    if (y !== 32'h40A0_0000) failures++;
    checks++;
    check(32'h3F80_0000, 32'h3F80_0000, 1, 0);  // x - x = +0
    check(32'h3F80_0000, 32'h3F80_0000, 1, 3);  // x - x = -0 in RM
    check(32'h7F80_0000, 32'h7F80_0000, 1, 0);  // inf - inf
    check(32'h7FC0_0001, 32'h3F80_0000, 0, 0);  // NaN
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 0, 0);  // overflow to inf
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 0, 1);  // overflow to max in RZ
    check(32'h0080_0000, 32'h0000_0001, 1, 0);  // into the denormal range
    check(32'h0000_0003, 32'h0000_0005, 0, 0);  // denormal + denormal
    check(32'h3F80_0000, 32'h3380_0000, 0, 0);  // tie, round to even
    check(32'h3F80_0001, 32'h3380_0000, 0, 0);  // tie, round up to even
    check(32'h3F80_0000, 32'h2F80_0000, 1, 0);  // far cancellation
    for (int i = 0; i < 40000; i++)
      check(rand_fp(), rand_fp(), 1'($urandom), 2'($urandom));
    // near-cancellation: close exponents, opposite signs
    for (int i = 0; i < 10000; i++) begin
      logic [31:0] x, z;
      x = rand_fp();
      z = x ^ 32'(($urandom & 32'hFF) | 32'h8000_0000);
      z[30:23] = x[30:23] - 8'($urandom_range(0, 1));
      check(x, z, 0, 2'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
