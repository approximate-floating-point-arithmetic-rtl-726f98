// fp_multiplier: double precision floating-point multiplier with a
// (truncated) array multiplier for the fractions.
//
// sign = s1 ^ s2; the exponent unit produces e1+e2-1023 and its increment in
// parallel; the 53 x 53 array multiplier forms the significand product in
// [1,4). Product bit 105 selects a one-position right normalisation and the
// incremented exponent; the fraction is then rounded in the requested IEEE
// mode from its round and sticky bits, the exponent is adjusted if rounding
// carries out, and overflow/underflow are checked last. This data flow
// follows the document's multiplier diagram.
//
// TRUNC_H is the number of least significant product columns the array
// multiplier does not build. The document proposes H = 46 as the largest
// truncation whose error in the rounded fraction stays within one LSB;
// H = 0 gives an IEEE-exact multiplier. With H > 0 the round and sticky bits
// come from an incomplete product, which is where the one-LSB error enters.
//
// This design's own choices: an exponent field of zero is read as zero (the
// document only treats normalised numbers), underflow flushes to a signed
// zero, overflow returns infinity or the largest finite number by rounding
// mode; infinities and NaNs are not handled. Combinational.
module fp_multiplier
  import fp_pkg::*;
#(
  parameter int unsigned TRUNC_H = 46
) (
  input  fp64_t  a,
  input  fp64_t  b,
  input  rmode_e rm,
  output fp64_t  y
);
  logic        sign_p;
  logic [12:0] exp_sum, exp_sum_p1, exp_norm, exp_fin;
  logic [105:0] fract_product;

  assign sign_p = a.sign ^ b.sign;

  exp_unit #(.SUBTRACT(1'b0)) u_exp (.e1(a.exp), .e2(b.exp), .lo(exp_sum), .hi(exp_sum_p1));

  array_multiplier #(.N(53), .H(TRUNC_H)) u_mul (
    .x({1'b1, a.frac}), .y({1'b1, b.frac}), .p(fract_product)
  );

  // normalisation
  logic        hi;
  logic [52:0] mant_t;
  logic        rnd, sticky, inc;
  assign hi       = fract_product[105];
  assign exp_norm = hi ? exp_sum_p1 : exp_sum;
  assign mant_t   = hi ? fract_product[105:53] : fract_product[104:52];
  assign rnd      = hi ? fract_product[52] : fract_product[51];
  assign sticky   = hi ? (|fract_product[51:0]) : (|fract_product[50:0]);

  // rounding and exponent adjustment
  logic [53:0] mant_r;
  assign inc     = round_up(rm, sign_p, mant_t[0], rnd, sticky);
  assign mant_r  = {1'b0, mant_t} + {53'd0, inc};
  assign exp_fin = exp_norm + {12'd0, mant_r[53]};

  // overflow / underflow check and output selection
  always_comb begin
    if (a.exp == '0 || b.exp == '0 || $signed(exp_fin) <= 13'sd0)
      y = '{sign: sign_p, exp: '0, frac: '0};
    else if ($signed(exp_fin) >= 13'sd2047)
      y = overflow_result(rm, sign_p);
    else
      y = '{sign: sign_p, exp: exp_fin[10:0],
            frac: mant_r[53] ? mant_r[52:1] : mant_r[51:0]};
  end
endmodule
