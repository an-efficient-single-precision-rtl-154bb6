// fp_ref_pkg: reference model of binary32 multiplication for the testbenches.
//
// It works through IEEE double precision, not the multiplier's datapath:
// both operands are converted exactly to real, multiplied (the product of two
// 24-bit significands is exact in a 53-bit double), and the double is rounded
// to binary32 by integer comparison of the dropped bits against one half,
// ties to even. Denormal results are formed by widening the dropped part.
// Special operands follow IEEE 754, with 0x7FC00000 as the NaN produced.
package fp_ref_pkg;

  typedef struct packed {
    logic [31:0] bits;
    logic        invalid;
    logic        overflow;
    logic        underflow;
    logic        inexact;
  } ref_t;

  function automatic real f2r(logic [31:0] x);
    real r;
    logic [10:0] de;
    // 2**-149 as a double: biased exponent 1023 - 149
    if (x[30:23] == 8'd0) begin
      r = real'(x[22:0]) * $bitstoreal({1'b0, 11'd874, 52'd0});
    end else begin
      de = 11'(x[30:23]) + 11'd896;   // 1023 - 127
      r  = $bitstoreal({1'b0, de, x[22:0], 29'd0});
    end
    return x[31] ? -r : r;
  endfunction

  // Round a finite real (exactly representable as a double) to binary32.
  function automatic ref_t r2f(real r, logic sign_if_zero);
    ref_t   o;
    logic [63:0] d;
    longint u, sh, ex;
    logic [63:0] sig, q, rem, half;
    o = '0;
    if (r == 0.0) begin
      o.bits = {sign_if_zero, 31'd0};
      return o;
    end
    d   = $realtobits(r);
    u   = longint'(d[62:52]) - 1023;
    sig = {11'd0, 1'b1, d[51:0]};
    if (u >= -126) sh = 29;
    else           sh = 29 + (-126 - u);
    if (sh > 62) begin
      q = 0; rem = sig; half = 64'd1 << 62;
    end else begin
      q    = sig >> sh;
      rem  = sig & ((64'd1 << sh) - 1);
      half = 64'd1 << (sh - 1);
    end
    o.inexact   = (rem != 0);
    o.underflow = (u < -126) && o.inexact;
    if (rem > half || (rem == half && q[0])) q = q + 1;
    if (u >= -126) begin
      ex = u + 127;
      if (q == (64'd1 << 24)) begin q = q >> 1; ex = ex + 1; end
      if (ex >= 255) begin
        o.bits = {d[63], 8'hFF, 23'd0};
        o.overflow = 1'b1;
        o.inexact  = 1'b1;
      end else begin
        o.bits = {d[63], ex[7:0], q[22:0]};
      end
    end else begin
      o.bits = {d[63], q[30:0]};   // q <= 2**23: exponent field 0 or 1
    end
    return o;
  endfunction

  function automatic logic is_nan(logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] != 0);
  endfunction
  function automatic logic is_inf(logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] == 0);
  endfunction
  function automatic logic is_zero(logic [31:0] x);
    return (x[30:0] == 0);
  endfunction

  function automatic ref_t mul(logic [31:0] a, logic [31:0] b);
    ref_t o;
    logic s;
    o = '0;
    s = a[31] ^ b[31];
    if (is_nan(a) || is_nan(b) || ((is_inf(a) || is_inf(b)) && (is_zero(a) || is_zero(b)))) begin
      o.bits    = 32'h7FC0_0000;
      o.invalid = (is_nan(a) && !a[22]) || (is_nan(b) && !b[22]) ||
                  ((is_inf(a) || is_inf(b)) && (is_zero(a) || is_zero(b)));
    end else if (is_inf(a) || is_inf(b)) begin
      o.bits = {s, 8'hFF, 23'd0};
    end else begin
      o = r2f(f2r(a) * f2r(b), s);
    end
    return o;
  endfunction

endpackage
