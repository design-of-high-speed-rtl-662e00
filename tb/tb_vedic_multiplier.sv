// tb_vedic_multiplier: self-checking testbench of vedic_multiplier.
//
// The default 24x24 instance (three halvings down to 3x3 Urdhva leaves) and
// an 8x8 (power of two, 2x2 leaves) and a 5x5 (odd, single leaf) instance
// are driven with random and extreme operands (0, 1, all ones, one-hot) and
// compared with the * operator. Combinational; checked 1 ns after each
// input change.
module tb_vedic_multiplier;
  logic [23:0] a24, b24;
  logic [47:0] p24;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [4:0]  a5, b5;
  logic [9:0]  p5;
  int checks = 0, failures = 0;

  vedic_multiplier u24 (.a(a24), .b(b24), .p(p24));
  vedic_multiplier #(.N(8), .SPARSITY(1)) u8 (.a(a8), .b(b8), .p(p8));
  vedic_multiplier #(.N(5)) u5 (.a(a5), .b(b5), .p(p5));

  task automatic apply(input logic [23:0] x, input logic [23:0] y);
    a24 = x; b24 = y; a8 = x[7:0]; b8 = y[7:0]; a5 = x[4:0]; b5 = y[4:0];
    #1;
    checks += 3;
    if (p24 !== 48'(x) * 48'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h", x, y, p24);
    end
    if (p8 !== 16'(x[7:0]) * 16'(y[7:0])) failures++;
    if (p5 !== 10'(x[4:0]) * 10'(y[4:0])) failures++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(24'hFFFFFF, 24'hFFFFFF);
    apply(24'h000000, 24'hFFFFFF);
    apply(24'h000001, 24'hABCDEF);
    apply(24'h800000, 24'h800000);
    for (int i = 0; i < 24; i++) apply(24'(1) << i, 24'hFFFFFF >> i);
    for (int i = 0; i < 20000; i++) apply(24'($urandom), 24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
