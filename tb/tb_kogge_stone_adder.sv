// tb_kogge_stone_adder: self-checking testbench of kogge_stone_adder.
//
// Four instances cover the default (32 bits, groups of 2), a dense tree
// (SPARSITY 1), groups of 4 with a width that is not a multiple of the
// group, and a one-group adder. Random and carry-chain corner operands
// (all ones plus one, alternating bits) are compared with the + operator,
// carry-out included. Combinational; checked 1 ns after each input change.
module tb_kogge_stone_adder;
  logic [31:0] a32, b32, s32, s32d;
  logic [26:0] a27, b27, s27;
  logic [2:0]  a3, b3, s3;
  logic        cin, c32, c32d, c27, c3;
  int checks = 0, failures = 0;

  kogge_stone_adder u_def (.a(a32), .b(b32), .cin(cin), .sum(s32), .cout(c32));
  kogge_stone_adder #(.W(32), .SPARSITY(1)) u_dense (.a(a32), .b(b32), .cin(cin), .sum(s32d), .cout(c32d));
  kogge_stone_adder #(.W(27), .SPARSITY(4)) u_sp4 (.a(a27), .b(b27), .cin(cin), .sum(s27), .cout(c27));
  kogge_stone_adder #(.W(3), .SPARSITY(4)) u_one (.a(a3), .b(b3), .cin(cin), .sum(s3), .cout(c3));

  task automatic apply(input logic [31:0] x, input logic [31:0] y, input logic c);
    logic [32:0] e32;
    logic [27:0] e27;
    logic [3:0]  e3;
    a32 = x; b32 = y; a27 = x[26:0]; b27 = y[26:0]; a3 = x[2:0]; b3 = y[2:0]; cin = c;
    #1;
    e32 = {1'b0, x} + {1'b0, y} + 33'(c);
    e27 = {1'b0, x[26:0]} + {1'b0, y[26:0]} + 28'(c);
    e3  = {1'b0, x[2:0]} + {1'b0, y[2:0]} + 4'(c);
    checks += 4;
    if ({c32, s32} !== e32) failures++;
    if ({c32d, s32d} !== e32) failures++;
    if ({c27, s27} !== e27) failures++;
    if ({c3, s3} !== e3) failures++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(32'hFFFF_FFFF, 32'h0000_0001, 0);
    apply(32'hFFFF_FFFF, 32'h0000_0000, 1);
    apply(32'hAAAA_AAAA, 32'h5555_5555, 1);
    apply(32'h7FFF_FFFF, 32'h7FFF_FFFF, 1);
    for (int i = 0; i < 20000; i++) apply($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
