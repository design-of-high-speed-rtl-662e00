// tb_fp_prenormalizer: self-checking testbench of fp_prenormalizer.
//
// For random normal significands (hidden bit set) the output must equal the
// input; for random denormal ones (hidden bit 0, with a random number of
// leading zeros) the output must have its top bit set and represent the
// same value: sig_n == sig << (exp_eff - exp_n).
module tb_fp_prenormalizer;
  logic [23:0]       sig, sig_n;
  logic [7:0]        exp_eff;
  logic signed [9:0] exp_n;
  int checks = 0, failures = 0;

  fp_prenormalizer dut (.sig(sig), .exp_eff(exp_eff), .sig_n(sig_n), .exp_n(exp_n));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int sh;
      if (i % 2 == 0) begin
        sig = 24'($urandom) | 24'h800000;
        exp_eff = 8'($urandom_range(1, 254));
      end else begin
        sig = 24'($urandom) >> $urandom_range(1, 23);
        if (sig == 0) sig = 24'd1;
        exp_eff = 8'd1;
      end
      #1;
      sh = int'(exp_eff) - int'(exp_n);
      checks++;
      if (!sig_n[23] || sh < 0 || sh > 23 || sig_n !== (sig << sh)) begin
        failures++;
        if (failures < 10) $display("FAIL sig=%h exp=%0d -> %h %0d", sig, exp_eff, sig_n, exp_n);
      end
      checks++;
      if (sig[23] && (sig_n !== sig || exp_n !== 10'(exp_eff))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
