// fp_prenorm: pre-normalization of one binary32 operand.
//
// Identifies the number type from the exponent and fraction fields (IEEE 754:
// exponent 0 with fraction 0 is zero, with fraction != 0 a denormal; exponent
// 255 is infinity or NaN; anything else is normal) and unpacks the operand
// for the calculation unit: the sign, the 24-bit significand with the hidden
// bit (1 for normal numbers, 0 for denormals) and the effective biased
// exponent, which is 1 for a denormal. The leading zeros of a denormal
// significand are removed later, on the product, by post-normalization.
// A NaN whose fraction MSB is 0 is reported as signalling (this design's
// choice). Combinational.
module fp_prenorm
  import fpm_pkg::*;
(
  input  fp32_t                  x,
  output logic                   sign,
  output logic signed [E_W-1:0]  exp,
  output logic [SIG_W-1:0]       sig,
  output fp_class_e              cls
);
  logic exp_zero, exp_ones, frac_zero;

  always_comb begin
    exp_zero  = (x.exp == '0);
    exp_ones  = (x.exp == EXP_W'(EXP_MAX));
    frac_zero = (x.frac == '0);

    if (exp_zero)      cls = frac_zero ? FP_ZERO : FP_DENORMAL;
    else if (exp_ones) cls = frac_zero ? FP_INF  : (x.frac[FRAC_W-1] ? FP_QNAN : FP_SNAN);
    else               cls = FP_NORMAL;

    sign = x.sign;
    sig  = {~exp_zero, x.frac};
    exp  = exp_zero ? E_W'(1) : E_W'({2'b00, x.exp});
  end
endmodule
