// tb_fp_align: self-checking testbench of fp_align.
//
// Random operand pairs (normal and denormal significands, exponent
// differences from 0 to over 50) are checked against value arithmetic done
// in wide integers: the big operand must be the one of larger magnitude,
// the small significand times 4 shifted right by the exponent difference
// must equal small_sig, and presticky must be set exactly when a 1 was
// shifted out.
module tb_fp_align;
  logic        sa, sb, big_sign, presticky, eff_sub;
  logic [7:0]  ea, eb, big_exp;
  logic [23:0] siga, sigb, big_sig;
  logic [25:0] small_sig;
  int checks = 0, failures = 0;

  fp_align dut (.sa(sa), .ea(ea), .siga(siga), .sb(sb), .eb(eb), .sigb(sigb),
                .big_sign(big_sign), .big_exp(big_exp), .big_sig(big_sig),
                .small_sig(small_sig), .presticky(presticky), .eff_sub(eff_sub));

  function automatic logic [23:0] rsig(input logic [7:0] e);
    logic [23:0] s;
    s = 24'($urandom);
    s[23] = (e != 8'd1) ? 1'b1 : 1'($urandom);
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [511:0] va, vb;
      logic [127:0] sm4, exp_small;
      logic [7:0]   es;
      logic [23:0]  ss;
      int d;
      sa = 1'($urandom); sb = 1'($urandom);
      ea = 8'($urandom_range(1, 254));
      eb = (i % 2 != 0) ? 8'($urandom_range(1, 254))
                   : 8'(int'(ea) + $urandom_range(0, 60) - 30 < 1 ? 1 :
                        int'(ea) + $urandom_range(0, 60) - 30 > 254 ? 254 :
                        int'(ea) + $urandom_range(0, 60) - 30);
      siga = rsig(ea); sigb = rsig(eb);
      #1;
      va = 512'(siga) << ea;
      vb = 512'(sigb) << eb;
      checks++;
      if ((va > vb && (big_sig !== siga || big_exp !== ea || big_sign !== sa)) ||
          (vb > va && (big_sig !== sigb || big_exp !== eb || big_sign !== sb))) failures++;
      es = (big_exp == ea && big_sig == siga && big_sign == sa) ? eb : ea;
      ss = (es == eb && !(big_exp == eb && big_sig == sigb && big_sign == sb)) ? sigb : siga;
      if (va == vb) begin es = eb; ss = sigb; end
      d = int'(big_exp) - int'(es);
      sm4 = 128'(ss) << 2;
      exp_small = (d >= 128) ? '0 : (sm4 >> d);
      checks++;
      if (small_sig !== exp_small[25:0] || exp_small[127:26] != 0) failures++;
      checks++;
      if (presticky !== ((d >= 100) ? (ss != 0) : ((sm4 & ((128'(1) << d) - 1)) != 0))) begin
        failures++;
        if (failures < 10) $display("FAIL presticky ea=%0d eb=%0d", ea, eb);
      end
      checks++;
      if (eff_sub !== (sa ^ sb)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
