// fp_divider: double precision floating-point divider built around the
// Newton-Raphson significand divider.
//
// sign = s1 ^ s2; the exponent unit forms EXP_DIF = e1 - e2 + 1023 and
// EXP_DIF - 1 in parallel; the Newton-Raphson unit returns the significand
// quotient in (1/2, 2) as FRACT_QUOTIENT[107:0]. Bit 107 selects EXP_DIF
// (quotient already in [1,2)) or a one-position left shift with EXP_DIF - 1.
// The fraction is rounded in the requested IEEE mode, the exponent adjusted
// if rounding carries out, and overflow and underflow are checked last. This
// flow follows the document's divider diagram. Because the reciprocal comes
// from a finite number of iterations, results may differ from the correctly
// rounded quotient in the last place; TRUNC_H > 0 truncates the shared
// multiplier as the document proposes.
//
// This design's own choices: operands and rounding mode are registered with
// start so the caller need not hold them; a zero dividend gives a signed zero
// and a zero divisor a signed infinity; underflow flushes to zero, overflow
// gives infinity or the largest finite number by rounding mode; infinity and
// NaN inputs are not handled.
// Interface: pulse start while busy is low; done pulses seven cycles later and
// y is valid from then until the next start.
module fp_divider
  import fp_pkg::*;
#(
  parameter int unsigned TRUNC_H = 48
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  fp64_t  a,          // dividend
  input  fp64_t  b,          // divisor
  input  rmode_e rm,
  output logic   busy,
  output logic   done,
  output fp64_t  y
);
  fp64_t  a_q, b_q;
  rmode_e rm_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= '0;
      b_q  <= '0;
      rm_q <= RM_NEAREST_EVEN;
    end else if (start && !busy) begin
      a_q  <= a;
      b_q  <= b;
      rm_q <= rm;
    end
  end

  logic [107:0] fract_quotient;

  nr_divider #(.TRUNC_H(TRUNC_H)) u_div (
    .clk(clk), .rst_n(rst_n), .start(start), .d_frac(b.frac), .n_frac(a.frac),
    .busy(busy), .done(done), .q(fract_quotient)
  );

  logic        sign_q;
  logic [12:0] exp_dif, exp_dif_m1, exp_norm, exp_fin;

  assign sign_q = a_q.sign ^ b_q.sign;

  exp_unit #(.SUBTRACT(1'b1)) u_exp (.e1(a_q.exp), .e2(b_q.exp), .lo(exp_dif_m1), .hi(exp_dif));

  // normalisation
  logic        top;
  logic [52:0] mant_t;
  logic        rnd, sticky, inc;
  assign top      = fract_quotient[107];
  assign exp_norm = top ? exp_dif : exp_dif_m1;
  assign mant_t   = top ? fract_quotient[107:55] : fract_quotient[106:54];
  assign rnd      = top ? fract_quotient[54] : fract_quotient[53];
  assign sticky   = top ? (|fract_quotient[53:0]) : (|fract_quotient[52:0]);

  // rounding and exponent adjustment
  logic [53:0] mant_r;
  assign inc     = round_up(rm_q, sign_q, mant_t[0], rnd, sticky);
  assign mant_r  = {1'b0, mant_t} + {53'd0, inc};
  assign exp_fin = exp_norm + {12'd0, mant_r[53]};

  // overflow / underflow check and output selection
  always_comb begin
    if (a_q.exp == '0 || $signed(exp_fin) <= 13'sd0)
      y = '{sign: sign_q, exp: '0, frac: '0};
    else if (b_q.exp == '0)
      y = '{sign: sign_q, exp: EXP_MAX, frac: '0};
    else if ($signed(exp_fin) >= 13'sd2047)
      y = overflow_result(rm_q, sign_q);
    else
      y = '{sign: sign_q, exp: exp_fin[10:0],
            frac: mant_r[53] ? mant_r[52:1] : mant_r[51:0]};
  end
endmodule
