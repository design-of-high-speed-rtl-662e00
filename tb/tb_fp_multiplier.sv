// tb_fp_multiplier: self-checking testbench of fp_multiplier.
//
// Drives directed cases (1.0 x 1.0, inf x 0, NaN, overflow, products that
// become denormal, denormal operands) and random operands biased toward
// special classes, in all four rounding modes, and compares result and
// flags with the exact-integer reference model of fp_ref_pkg. The
// multiplier is combinational; each vector is checked 1 ns
// after it is applied.
module tb_fp_multiplier;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  logic [1:0]  rmode;
  logic [4:0]  flags;
  int checks = 0, failures = 0;

  fp_multiplier dut (.a(a), .b(b), .rmode(fp_pkg::rmode_e'(rmode)), .y(y), .flags(flags));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic [1:0] tm);
    logic [31:0] exp_y;
    logic [4:0]  exp_f;
    a = ta; b = tb_; rmode = tm;
    #1;
    exp_y = ref_mul(ta, tb_, tm, exp_f);
    checks++;
    if (y !== exp_y || flags !== exp_f) begin
      failures++;
      if (failures < 10)
        $display("FAIL mul a=%h b=%h mode=%0d: got %h/%b expected %h/%b",
                 ta, tb_, tm, y, flags, exp_y, exp_f);
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
    check(32'h3F80_0000, 32'h3F80_0000, 0);  // 1.0 x 1.0
    checks++;
    if (y !== 32'h3F80_0000) failures++;
    check(32'h4040_0000, 32'hC0A0_0000, 0);  // 3 x -5
    check(32'h7F80_0000, 32'h0000_0000, 0);  // inf x 0
    check(32'h7FC0_0000, 32'h3F80_0000, 0);  // NaN
    check(32'h7F00_0000, 32'h4000_0000, 0);  // overflow
    check(32'h7F00_0000, 32'h4000_0000, 1);  // overflow, RZ
    check(32'h7F00_0000, 32'hC000_0000, 2);  // negative overflow, RP
    check(32'h0080_0000, 32'h3F00_0000, 0);  // becomes denormal exactly
    check(32'h0080_0001, 32'h3F00_0000, 0);  // denormal, tie
    check(32'h0000_0001, 32'h4B00_0000, 0);  // denormal operand
    check(32'h0000_0001, 32'h3F00_0000, 2);  // below the smallest denormal
    check(32'h3F7F_FFFF, 32'h3F7F_FFFF, 3);
    for (int i = 0; i < 50000; i++)
      check(rand_fp(), rand_fp(), 2'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
