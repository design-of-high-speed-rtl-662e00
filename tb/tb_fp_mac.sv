// tb_fp_mac: end-to-end testbench of the floating-point MAC at its default
// parameters.
//
// A cycle-level model built from the exact-integer reference of fp_ref_pkg
// (acc <= acc + a*b, with clipping to the largest finite magnitude on
// overflow) runs beside the DUT. Inputs change on the falling edge and
// acc_out and both flag words are compared after every rising edge, which
// also checks the one-clock latency of an accumulate. The test runs:
//   1. 1.0 x 1.0 accumulated five times from reset: 1, 2, 3, 4, 5
//   2. cycles with enable low, which must hold the accumulator
//   3. a long random run over all rounding modes, with operands biased
//      toward denormals, huge values, infinities and NaNs, and resets
//   4. directed runs that drive the accumulator into overflow (clipping by
//      the adder and by the multiplier) and into the denormal range
// Each mechanism is counted; one that never happened counts as a failure.
module tb_fp_mac;
  import fp_ref_pkg::*;

  logic        clk = 0, rst, en;
  logic [1:0]  rmode;
  logic [31:0] mul_a, mul_b, acc_out;
  logic [4:0]  mul_flags, add_flags;
  int checks = 0, failures = 0;

  // model state
  logic [31:0] m_acc;
  logic [4:0]  m_mf, m_af;

  // mechanism counters
  int n_acc, n_hold, n_rst, n_sat_add, n_sat_mul, n_nan, n_unf, n_inx, n_inf;
  int n_mode [4];

  fp_mac dut (.clk(clk), .rst(rst), .en(en), .rmode(rmode), .mul_a(mul_a), .mul_b(mul_b),
              .acc_out(acc_out), .mul_flags(mul_flags), .add_flags(add_flags));

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Operands for the random run: mostly ordinary values, so the
  // accumulator does not sit at NaN, with a few of every special class.
  function automatic logic [31:0] mac_operand();
    logic [31:0] r;
    r = $urandom;
    if ($urandom_range(0, 511) == 0) return rand_fp();
    r[30:23] = 8'($urandom_range(90, 160));
    return r;
  endfunction

  // Apply one cycle of inputs, advance the model, compare after the edge.
  task automatic step(input logic r, input logic e, input logic [1:0] m,
                      input logic [31:0] a, input logic [31:0] b);
    logic [31:0] p, s;
    logic [4:0]  mf, af;
    rst = r; en = e; rmode = m; mul_a = a; mul_b = b;
    if (r) begin
      m_acc = 0; m_mf = 0; m_af = 0;
      n_rst++;
    end else if (e) begin
      p = ref_mul(a, b, m, mf);
      s = ref_add(m_acc, p, 1'b0, m, af);
      n_acc++;
      n_mode[m]++;
      if ((mf[2] || af[2]) && !af[4]) begin
        s = {s[31], 31'h7F7F_FFFF};
        if (af[2]) n_sat_add++;
        else n_sat_mul++;
      end
      if (af[4]) n_nan++;
      if (af[1] || mf[1]) n_unf++;
      if (af[0] || mf[0]) n_inx++;
      if (af[3] && !mf[3]) n_inf++;
      m_acc = s; m_mf = mf; m_af = af;
    end else begin
      n_hold++;
    end
    @(posedge clk);
    #1;
    checks++;
    if (acc_out !== m_acc || mul_flags !== m_mf || add_flags !== m_af) begin
      failures++;
      if (failures < 10)
        $display("FAIL t=%0t r=%b e=%b m=%0d a=%h b=%h: acc %h/%b/%b expected %h/%b/%b",
                 $time, r, e, m, a, b, acc_out, mul_flags, add_flags, m_acc, m_mf, m_af);
    end
    @(negedge clk);
  endtask

  initial begin
    rst = 1; en = 0; rmode = 0; mul_a = 0; mul_b = 0;
    @(negedge clk);
    step(1, 0, 0, 0, 0);

    // 1. 1.0 x 1.0 accumulated from reset
    for (int i = 0; i < 5; i++) begin
      automatic logic [31:0] want [5] = '{32'h3F80_0000, 32'h4000_0000, 32'h4040_0000,
                                32'h4080_0000, 32'h40A0_0000};
      step(0, 1, 0, 32'h3F80_0000, 32'h3F80_0000);
      checks++;
      if (acc_out !== want[i]) begin
        failures++;
        $display("FAIL accumulate %0d of 1.0 x 1.0: %h", i + 1, acc_out);
      end
    end

    // 2. enable low holds the accumulator
    for (int i = 0; i < 4; i++) step(0, 0, 0, 32'h4000_0000, 32'h4000_0000);

    // 3. random run
    for (int i = 0; i < 30000; i++) begin
      logic r, e;
      r = ($urandom_range(0, 199) == 0);
      e = ($urandom_range(0, 7) != 0);
      step(r, e, 2'($urandom), mac_operand(), mac_operand());
    end

    // 4a. growth into overflow through the adder: acc doubles each step
    for (int m = 0; m < 4; m++) begin
      step(1, 0, 2'(m), 0, 0);
      step(0, 1, 2'(m), 32'h7E80_0000, 32'h3F80_0000);
      for (int i = 0; i < 4; i++) step(0, 1, 2'(m), 32'h7F00_0000, 32'h3F80_0000);
      step(0, 1, 2'(m), 32'hFF00_0000, 32'h3F80_0000);  // clip and come back
    end
    // 4b. overflow inside the multiplier
    step(1, 0, 0, 0, 0);
    step(0, 1, 0, 32'h7F00_0000, 32'h7F00_0000);
    step(0, 1, 1, 32'hFF00_0000, 32'h7F00_0000);
    // 4c. denormal products accumulate
    step(1, 0, 0, 0, 0);
    for (int i = 0; i < 8; i++) step(0, 1, 2'(i), 32'h0080_0003, 32'h3E00_0001);
    // 4d. NaN
    step(0, 1, 0, 32'h7F80_0000, 32'h0000_0000);
    step(1, 0, 0, 0, 0);

    $display("accumulates=%0d holds=%0d resets=%0d clip_add=%0d clip_mul=%0d nan=%0d underflow=%0d inexact=%0d infinity=%0d modes=%0d/%0d/%0d/%0d",
             n_acc, n_hold, n_rst, n_sat_add, n_sat_mul, n_nan, n_unf, n_inx, n_inf,
             n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
    foreach (n_mode[i]) begin
      checks++;
      if (n_mode[i] == 0) failures++;
    end
    checks += 9;
    if (n_acc == 0) failures++;
    if (n_hold == 0) failures++;
    if (n_rst == 0) failures++;
    if (n_sat_add == 0) failures++;
    if (n_sat_mul == 0) failures++;
    if (n_nan == 0) failures++;
    if (n_unf == 0) failures++;
    if (n_inx == 0) failures++;
    if (n_inf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
