// tb_fp_rounder: self-checking testbench of fp_rounder.
//
// Random normalised inputs (normal and denormal, exponent fields up to past
// the overflow limit, mantissas near all-ones to provoke carries) in all
// four modes are compared with the rounding function of fp_ref_pkg, which
// rounds the exact value {mant, round, sticky} * 2^(e-152) by comparing the
// discarded remainder with half an ulp.
module tb_fp_rounder;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  logic        sign, rnd, stk, overflow, underflow, inexact;
  logic [9:0]  exp_field;
  logic [23:0] mant;
  logic [1:0]  mode;
  fp32_t       y;
  int checks = 0, failures = 0;

  fp_rounder dut (.sign(sign), .exp_field(exp_field), .mant(mant), .rnd(rnd), .stk(stk),
                  .rmode(rmode_e'(mode)), .y(y), .overflow(overflow), .underflow(underflow),
                  .inexact(inexact));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] ey;
      logic [4:0]  ef;
      sign = 1'($urandom); rnd = 1'($urandom); stk = 1'($urandom); mode = 2'($urandom);
      case (i % 4)
        0: exp_field = 10'd0;
        1: exp_field = 10'($urandom_range(250, 260));
        default: exp_field = 10'($urandom_range(1, 254));
      endcase
      mant = 24'($urandom);
      if (i % 8 == 5) mant = 24'hFFFFFF;
      mant[23] = (exp_field != 0);
      #1;
      checks++;
      if (mant == 0 && !rnd && !stk) begin
        if (y !== {sign, 31'd0} || overflow || underflow || inexact) failures++;
      end else begin
        ey = ref_round(sign, wide_t'({mant, rnd, stk}),
                       ((exp_field == 0) ? 1 : int'(exp_field)) - 152, mode, ef);
        if (y !== ey || {overflow, underflow, inexact} !== ef[2:0]) begin
          failures++;
          if (failures < 10)
            $display("FAIL e=%0d m=%h r=%b s=%b mode=%0d: %h %b%b%b expected %h %b",
                     exp_field, mant, rnd, stk, mode, y, overflow, underflow, inexact, ey, ef);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
