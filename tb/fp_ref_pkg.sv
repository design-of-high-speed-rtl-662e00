// fp_ref_pkg: reference model of IEEE-754 single-precision multiply and
// add used by the testbenches.
//
// It works differently from the RTL: operands are decoded to an integer
// significand M and a power-of-two scale E (value = M * 2^E), the exact sum
// or product is formed as a 320-bit integer, and ref_round rounds that
// exact value once, by comparing the discarded remainder with half an ulp.
// Rounding modes are 0 nearest-even, 1 toward zero, 2 toward +inf,
// 3 toward -inf. Flags are {invalid, infinity, overflow, underflow,
// inexact}; underflow means tiny before rounding and inexact; NaN results
// are the quiet NaN 0x7FC00000.
package fp_ref_pkg;

  typedef logic [319:0] wide_t;

  function automatic logic is_nan(logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] != 0;
  endfunction

  function automatic logic is_inf(logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] == 0;
  endfunction

  function automatic logic is_zero(logic [31:0] x);
    return x[30:0] == 0;
  endfunction

  // value = m * 2^e for a finite operand
  function automatic void decode(input logic [31:0] x, output logic [23:0] m, output int e);
    if (x[30:23] == 0) begin
      m = {1'b0, x[22:0]};
      e = -149;
    end else begin
      m = {1'b1, x[22:0]};
      e = int'(x[30:23]) - 150;
    end
  endfunction

  // Round sign * m * 2^e (m > 0) to single precision.
  function automatic logic [31:0] ref_round(input logic sgn, input wide_t m, input int e,
                                            input logic [1:0] mode, output logic [4:0] flags);
    int h, q, sh, biased;
    wide_t kept, rem, half;
    logic inc, ovf, tiny, inx;
    logic [31:0] r;
    h = 0;
    for (int i = 0; i < 320; i++) if (m[i]) h = i;
    q = h + e - 23;
    if (q < -149) q = -149;
    sh = q - e;
    if (sh > 0) begin
      kept = m >> sh;
      rem  = m & ((wide_t'(1) << sh) - 1);
      half = wide_t'(1) << (sh - 1);
    end else begin
      kept = m << (-sh);
      rem  = 0;
      half = 0;
    end
    inx = (rem != 0);
    case (mode)
      2'd0: inc = (rem > half) || (rem == half && rem != 0 && kept[0]);
      2'd1: inc = 0;
      2'd2: inc = inx && !sgn;
      default: inc = inx && sgn;
    endcase
    kept = kept + wide_t'(inc);
    if (kept == (wide_t'(1) << 24)) begin
      kept = kept >> 1;
      q++;
    end
    tiny = (h + e) < -126;
    biased = q + 150;
    ovf = (kept >= (wide_t'(1) << 23)) && (biased >= 255);
    if (ovf) begin
      logic to_inf;
      case (mode)
        2'd0: to_inf = 1;
        2'd1: to_inf = 0;
        2'd2: to_inf = !sgn;
        default: to_inf = sgn;
      endcase
      r = to_inf ? {sgn, 31'h7F80_0000} : {sgn, 31'h7F7F_FFFF};
      inx = 1;
    end else if (kept >= (wide_t'(1) << 23)) begin
      r = {sgn, 8'(biased), kept[22:0]};
    end else begin
      r = {sgn, 8'd0, kept[22:0]};
    end
    flags = {1'b0, is_inf(r), ovf, tiny && inx, inx};
    return r;
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b,
                                          input logic [1:0] mode, output logic [4:0] flags);
    logic [23:0] ma, mb;
    int ea, eb;
    logic s;
    s = a[31] ^ b[31];
    flags = 0;
    if (is_nan(a) || is_nan(b) || (is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b))) begin
      flags = 5'b10000;
      return 32'h7FC0_0000;
    end
    if (is_inf(a) || is_inf(b)) begin
      flags = 5'b01000;
      return {s, 31'h7F80_0000};
    end
    if (is_zero(a) || is_zero(b)) return {s, 31'd0};
    decode(a, ma, ea);
    decode(b, mb, eb);
    return ref_round(s, wide_t'(ma) * wide_t'(mb), ea + eb, mode, flags);
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b0,
                                          input logic sub, input logic [1:0] mode,
                                          output logic [4:0] flags);
    logic [31:0] b;
    logic [23:0] ma, mb;
    int ea, eb, emin;
    wide_t wa, wb;
    b = {b0[31] ^ sub, b0[30:0]};
    flags = 0;
    if (is_nan(a) || is_nan(b) || (is_inf(a) && is_inf(b) && a[31] != b[31])) begin
      flags = 5'b10000;
      return 32'h7FC0_0000;
    end
    if (is_inf(a)) begin flags = 5'b01000; return a; end
    if (is_inf(b)) begin flags = 5'b01000; return b; end
    decode(a, ma, ea);
    decode(b, mb, eb);
    emin = (ea < eb) ? ea : eb;
    wa = wide_t'(ma) << (ea - emin);
    wb = wide_t'(mb) << (eb - emin);
    if (a[31] == b[31]) begin
      if (wa + wb == 0) return {a[31], 31'd0};
      return ref_round(a[31], wa + wb, emin, mode, flags);
    end
    if (wa == wb) return {mode == 2'd3, 31'd0};
    if (wa > wb) return ref_round(a[31], wa - wb, emin, mode, flags);
    return ref_round(b[31], wb - wa, emin, mode, flags);
  endfunction

  // Random operand with a bias toward the interesting classes.
  function automatic logic [31:0] rand_fp();
    logic [31:0] r;
    r = $urandom;
    case ($urandom_range(0, 15))
      0: r[30:23] = 8'h00;                              // denormal / zero
      1: r[30:0]  = 31'd0;                              // zero
      2: r[30:23] = 8'hFF;                              // NaN / inf
      3: r[30:0]  = 31'h7F80_0000;                      // inf
      4: r[30:23] = 8'(($urandom_range(0, 1) != 0) ? $urandom_range(1, 8) : $urandom_range(246, 254));
      5: r[22:0]  = ($urandom_range(0, 1) != 0) ? 23'h7FFFFF : 23'h000000;
      6: r[30:23] = 8'($urandom_range(100, 154));
      default: ;
    endcase
    return r;
  endfunction

endpackage
