// fp_mult32: IEEE 754 single precision floating point multiplier built around
// a classical recoding, split operand, parallel processing (CRSOPP)
// significand multiplier.
//
// Datapath (left to right, all combinational, no registers):
//   fp_prenorm  x2  - number type, sign, effective exponent, 24-bit significand
//   fp_calc_unit    - sign XOR, exponent adder (ea + eb - 127) and the
//                     24 x 24 CRSOPP significand multiplier (48-bit product)
//   fp_postnorm     - leading zero normalization, round to nearest even,
//                     denormal results, exceptions, packing
// result and flags follow a and b after the combinational delay; there is no
// clock. The three-unit chain and the significand multiplier follow the
// document; the flag outputs are this design's choice.
module fp_mult32
  import fpm_pkg::*;
(
  input  fp32_t     a,
  input  fp32_t     b,
  output fp32_t     result,
  output fp_flags_t flags
);
  logic                  sa, sb, s;
  logic signed [E_W-1:0] ea, eb, e;
  logic [SIG_W-1:0]      siga, sigb;
  logic [PROD_W-1:0]     p;
  fp_class_e             cls_a, cls_b;

  fp_prenorm u_pre_a (.x(a), .sign(sa), .exp(ea), .sig(siga), .cls(cls_a));
  fp_prenorm u_pre_b (.x(b), .sign(sb), .exp(eb), .sig(sigb), .cls(cls_b));

  fp_calc_unit u_calc (
    .sa(sa), .sb(sb), .ea(ea), .eb(eb), .siga(siga), .sigb(sigb),
    .s(s), .e(e), .p(p)
  );

  fp_postnorm u_post (
    .s(s), .e(e), .p(p), .cls_a(cls_a), .cls_b(cls_b),
    .result(result), .flags(flags)
  );
endmodule
