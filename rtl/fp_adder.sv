// fp_adder: double precision floating-point adder/subtractor with two paths.
//
// y = a + b (sub = 0) or a - b (sub = 1), rounded in mode rm. Both the R-path
// (far path with alignment shift, rounding and one-position normalisation)
// and the N-path (near path for cancelling subtractions, exact, with
// leading-one detection and left normalisation) run in parallel on the same
// operands; the path selection picks the R-path when
//   IS_R = IS_R1 | IS_R2 | ~S_EFF,
// i.e. for effective additions, for |delta| >= 2 and when the N-path finds
// its difference is not below one. This partitioning and the selection
// equation follow the document.
//
// Special values are this design's choice, since the document targets
// normalised operands: an exponent field of zero is read as zero (denormals
// flush to zero), results below the normal range flush to a signed zero, an
// exact cancellation gives +0 (-0 when rounding towards minus infinity),
// and overflow gives infinity or the largest finite number by rounding mode.
// Infinity and NaN inputs are not handled.
//
// RSHIFT_W and CTRL_BITS select the approximate alignment shifter of the
// R-path (118/6 is the exact IEEE configuration; 54 drops round and sticky
// bits; fewer control bits cap the alignment shift).
// Combinational; is_r reports which path produced the result.
module fp_adder
  import fp_pkg::*;
#(
  parameter int unsigned RSHIFT_W  = 118,
  parameter int unsigned CTRL_BITS = 6
) (
  input  fp64_t  a,
  input  fp64_t  b,
  input  logic   sub,
  input  rmode_e rm,
  output fp64_t  y,
  output logic   is_r
);
  logic sb;
  assign sb = b.sign ^ sub;

  logic              s_eff, is_r1, sign_r;
  logic [12:0]       exp_r;
  logic [52:0]       mant_r;
  logic              is_r2, zero_n, sign_n;
  logic signed [12:0] exp_n;
  logic [52:0]       mant_n;

  fpa_rpath #(.RSHIFT_W(RSHIFT_W), .CTRL_BITS(CTRL_BITS)) u_rpath (
    .sa(a.sign), .ea(a.exp), .fa(a.frac), .sb(sb), .eb(b.exp), .fb(b.frac), .rm(rm),
    .s_eff(s_eff), .is_r1(is_r1), .sign_r(sign_r), .exp_r(exp_r), .mant_r(mant_r)
  );

  fpa_npath u_npath (
    .sa(a.sign), .ea(a.exp), .fa(a.frac), .sb(sb), .eb(b.exp), .fb(b.frac),
    .is_r2(is_r2), .zero_n(zero_n), .sign_n(sign_n), .exp_n(exp_n), .mant_n(mant_n)
  );

  assign is_r = is_r1 | is_r2 | ~s_eff;

  always_comb begin
    if (a.exp == '0 && b.exp == '0) begin
      y = '0;
      y.sign = (rm == RM_MINUS_INF) ? (a.sign | sb) : (a.sign & sb);
    end else if (a.exp == '0) begin
      y = '{sign: sb, exp: b.exp, frac: b.frac};
    end else if (b.exp == '0) begin
      y = a;
    end else if (is_r) begin
      if (exp_r >= 13'(EXP_MAX)) y = overflow_result(rm, sign_r);
      else if (exp_r == '0)      y = '{sign: sign_r, exp: '0, frac: '0};
      else                       y = '{sign: sign_r, exp: exp_r[10:0], frac: mant_r[51:0]};
    end else begin
      if (zero_n)               y = '{sign: (rm == RM_MINUS_INF), exp: '0, frac: '0};
      else if (exp_n <= 13'sd0) y = '{sign: sign_n, exp: '0, frac: '0};
      else                      y = '{sign: sign_n, exp: exp_n[10:0], frac: mant_n[51:0]};
    end
  end
endmodule
