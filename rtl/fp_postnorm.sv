// fp_postnorm: post-normalization, rounding and exception handling.
//
// Takes the sign s, the exponent e = ea + eb - 127 and the raw 48-bit
// significand product p of the calculation unit, plus the classes of the two
// operands, and delivers the binary32 result and its status flags.
//  * Normalization: a leading zero detector counts the zeros above the
//    leading one of p; p is shifted left by that count so its leading one
//    sits at bit 47, and the biased result exponent becomes e + 1 - count
//    (the +1 is the document's "MSB is 1" case, the count its leading zero
//    detector case).
//  * Denormal results: when that exponent is below 1, the significand is
//    shifted right by the difference (bits shifted out kept as sticky) and the
//    exponent field is 0 (IEEE 754 gradual underflow).
//  * Rounding: round to nearest, ties to even, on the guard bit (bit 23 of
//    the aligned product) and the sticky OR of the bits below it. The
//    increment is added to the packed {exponent, fraction} field, so a
//    fraction carry moves into the exponent and an overflow lands on infinity.
//  * Exceptions: NaN operands and 0 x infinity give the quiet NaN 0x7FC00000
//    (0 x infinity and signalling NaNs raise invalid); infinity and zero
//    operands give a signed infinity or zero; an exponent of 255 or more gives
//    infinity with overflow; a result that is tiny before rounding and inexact
//    raises underflow.
// Round to nearest even and the leading zero detector follow the document;
// the IEEE 754 details of denormals, NaN and flags are this design's.
// Combinational.
module fp_postnorm
  import fpm_pkg::*;
(
  input  logic                  s,
  input  logic signed [E_W-1:0] e,
  input  logic [PROD_W-1:0]     p,
  input  fp_class_e             cls_a,
  input  fp_class_e             cls_b,
  output fp32_t                 result,
  output fp_flags_t             flags
);
  localparam int unsigned CW = $clog2(PROD_W + 1);
  // signed exponent constants, so that every exponent compare is signed
  localparam logic signed [E_W-1:0] E_ONE = E_W'(1);
  localparam logic signed [E_W-1:0] E_MAX = E_W'(EXP_MAX);
  localparam logic signed [E_W-1:0] E_PW  = E_W'(PROD_W);

  logic [CW-1:0]         lz;
  logic [PROD_W-1:0]     pn, ps, lost_mask;
  logic signed [E_W-1:0] er;
  logic [CW-1:0]         sh;
  logic                  tiny, big, guard, sticky, lsb, rup;
  logic [EXP_W-1:0]      exp_field;
  logic [EXP_W+FRAC_W-1:0] packed_pre, packed_rnd;
  logic                  nan_in, inf_in, zero_in, snan_in;

  lzd #(.W(PROD_W)) u_lzd (.x(p), .count(lz));

  always_comb begin
    // normalization
    pn = p << lz;
    er = e + E_ONE - $signed(E_W'(lz));

    tiny = (er < E_ONE);
    big  = (er >= E_MAX);

    // denormal alignment: shift right by 1 - er, at most the product width
    if (!tiny)                     sh = '0;
    else if ((E_ONE - er) >= E_PW) sh = CW'(PROD_W);
    else                           sh = CW'(E_ONE - er);

    for (int unsigned i = 0; i < PROD_W; i++) lost_mask[i] = (i < sh);
    ps = pn >> sh;

    exp_field = tiny ? '0 : er[EXP_W-1:0];

    guard  = ps[PROD_W-SIG_W-1];
    sticky = (|ps[PROD_W-SIG_W-2:0]) | (|(pn & lost_mask));
    lsb    = ps[PROD_W-SIG_W];
    rup    = guard & (sticky | lsb);

    packed_pre = {exp_field, ps[PROD_W-2 -: FRAC_W]};
    packed_rnd = packed_pre + (EXP_W+FRAC_W)'(rup);

    // exceptions
    nan_in  = (cls_a inside {FP_QNAN, FP_SNAN}) || (cls_b inside {FP_QNAN, FP_SNAN});
    snan_in = (cls_a == FP_SNAN) || (cls_b == FP_SNAN);
    inf_in  = (cls_a == FP_INF)  || (cls_b == FP_INF);
    zero_in = (cls_a == FP_ZERO) || (cls_b == FP_ZERO);

    flags  = '0;
    result = '0;
    if (nan_in || (inf_in && zero_in)) begin
      result        = QNAN;
      flags.invalid = snan_in || (inf_in && zero_in);
    end else if (inf_in) begin
      result = '{sign: s, exp: EXP_W'(EXP_MAX), frac: '0};
    end else if (zero_in) begin
      result = '{sign: s, exp: '0, frac: '0};
    end else if (big || packed_rnd[EXP_W+FRAC_W-1 -: EXP_W] == EXP_W'(EXP_MAX)) begin
      result         = '{sign: s, exp: EXP_W'(EXP_MAX), frac: '0};
      flags.overflow = 1'b1;
      flags.inexact  = 1'b1;
    end else begin
      result          = {s, packed_rnd};
      flags.inexact   = guard | sticky;
      flags.underflow = tiny & (guard | sticky);
    end
  end
endmodule
