// fp_exp_adder: exponent of the product, e = ea + eb - BIAS (BIAS = 127 for
// single precision), as in the document.
//
// Inputs are the effective biased exponents from pre-normalization (1..254
// for finite non-zero operands). The result is kept in E_W-bit two's
// complement (-512..511) so that exponent underflow and overflow remain
// visible to post-normalization, which also applies the +1 / leading-zero
// correction. The width is this design's choice. Combinational.
module fp_exp_adder
  import fpm_pkg::*;
#(
  parameter int unsigned BIAS_P = BIAS
) (
  input  logic signed [E_W-1:0] ea,
  input  logic signed [E_W-1:0] eb,
  output logic signed [E_W-1:0] e
);
  assign e = ea + eb - E_W'(BIAS_P);
endmodule
