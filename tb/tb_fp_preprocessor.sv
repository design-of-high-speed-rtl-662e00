// tb_fp_preprocessor: self-checking testbench of fp_preprocessor.
//
// Random words with the exponent forced to 0, 255 or a random value are
// classified by comparing fields directly, and the effective exponent and
// significand are checked through the value they encode: a normal word
// gives {1, fraction} and its exponent, a denormal {0, fraction} and 1.
module tb_fp_preprocessor;
  import fp_pkg::*;
  fp32_t       x;
  logic        sign;
  logic [7:0]  exp_eff;
  logic [23:0] sig;
  fp_class_t   cls;
  int checks = 0, failures = 0;

  fp_preprocessor dut (.x(x), .sign(sign), .exp_eff(exp_eff), .sig(sig), .cls(cls));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] w;
      logic        e0, e1, f0;
      w = $urandom;
      case (i % 5)
        0: w[30:23] = 8'h00;
        1: w[30:23] = 8'hFF;
        2: w[22:0]  = 23'd0;
        default: ;
      endcase
      if (i % 17 == 0) w[22:0] = 23'd0;
      x = fp32_t'(w);
      #1;
      e0 = (w[30:23] == 0); e1 = (w[30:23] == 8'hFF); f0 = (w[22:0] == 0);
      checks++;
      if (cls !== {e1 && !f0, e1 && f0, e0 && f0, e0 && !f0}) failures++;
      checks++;
      if (sign !== w[31]) failures++;
      checks++;
      if (e0 ? (exp_eff !== 8'd1 || sig !== {1'b0, w[22:0]})
             : (exp_eff !== w[30:23] || sig !== {1'b1, w[22:0]})) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
