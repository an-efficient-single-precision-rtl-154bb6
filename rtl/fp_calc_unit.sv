// fp_calc_unit: calculation unit of the multiplier.
//
// Runs the three independent parts of a floating point multiplication side by
// side on the unpacked operands: the sign (fp_sign_unit), the exponent sum
// minus the bias (fp_exp_adder) and the 24 x 24 significand product
// (crsopp_mult24, the classical recoding split-operand multiplier). The 48-bit
// product is not yet normalized: its leading one is at bit 47 or 46 for normal
// operands, lower when a denormal took part. The grouping of the three parts
// into one unit follows the document. Combinational.
module fp_calc_unit
  import fpm_pkg::*;
(
  input  logic                  sa,
  input  logic                  sb,
  input  logic signed [E_W-1:0] ea,
  input  logic signed [E_W-1:0] eb,
  input  logic [SIG_W-1:0]      siga,
  input  logic [SIG_W-1:0]      sigb,
  output logic                  s,
  output logic signed [E_W-1:0] e,
  output logic [PROD_W-1:0]     p
);
  fp_sign_unit u_sign (.sa(sa), .sb(sb), .s(s));
  fp_exp_adder u_exp  (.ea(ea), .eb(eb), .e(e));
  crsopp_mult24 u_mant (.a(siga), .b(sigb), .p(p));
endmodule
