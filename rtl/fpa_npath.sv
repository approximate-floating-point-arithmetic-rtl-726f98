// fpa_npath: N-path of the dual-path floating-point adder.
//
// The N-path assumes an effective subtraction with |delta| <= 1 whose
// preshifted significand difference is below 2. Under those assumptions the
// difference is exact in 54 bits, so no rounding is needed; instead a
// leading-one detector and a left barrel shifter normalise the result.
//
// Steps, as in the document's N-path diagram:
//  * Exponent difference prediction: a 2-bit adder forms
//    DELTA = ea[1:0] + ~eb[1:0] + 1 = ea - eb (mod 4).
//  * Small significand: select, align and preshift. The inverted significand
//    of B is placed as {FBO,1} (delta = 0) or {1,FBO} (delta = 1); for
//    delta = -1 the inverted significand of A is used as {1,FAO}.
//  * Large significand: {FB,0} with sign SB when delta = -1, else {FA,0}
//    with sign SA.
//  * Lazy one's-complement subtraction on a compound adder with both
//    operands sign-extended: if the sum's sign bit is set the magnitude is
//    its complement, otherwise it is the incremented sum.
//  * LOD and a radix-8 left barrel shifter normalise; the exponent becomes
//    EL - 1 - (leading zero count).
// is_r2 (bit 53 of the magnitude, i.e. preshifted difference in [2,4)) tells
// the path selection that the R-path result must be used. Results for inputs
// outside the N-path's assumptions are don't-care. Combinational.
module fpa_npath
  import fp_pkg::*;
(
  input  logic              sa,
  input  logic [EXP_W-1:0]  ea,
  input  logic [FRAC_W-1:0] fa,
  input  logic              sb,        // sign of B after add/sub
  input  logic [EXP_W-1:0]  eb,
  input  logic [FRAC_W-1:0] fb,
  output logic              is_r2,
  output logic              zero_n,    // exact cancellation
  output logic              sign_n,
  output logic signed [12:0] exp_n,    // biased exponent, may be <= 0
  output logic [52:0]       mant_n     // normalised significand
);
  // ---------------- exponent difference prediction ----------------
  logic [1:0] delta;
  assign delta = ea[1:0] + ~eb[1:0] + 2'd1;

  // ---------------- align and swap ----------------
  logic [52:0] fa_m, fb_m, fao, fbo;
  logic [53:0] fb_sel, fsopa, flp;
  logic        sl;
  logic [10:0] el;

  assign fa_m   = {1'b1, fa};
  assign fb_m   = {1'b1, fb};
  assign fao    = ~fa_m;
  assign fbo    = ~fb_m;
  assign fb_sel = delta[0] ? {1'b1, fbo} : {fbo, 1'b1};
  assign fsopa  = delta[1] ? {1'b1, fao} : fb_sel;
  assign flp    = delta[1] ? {fb_m, 1'b0} : {fa_m, 1'b0};
  assign sl     = delta[1] ? sb : sa;
  assign el     = delta[1] ? eb : ea;

  // ---------------- significand subtraction ----------------
  logic [55:0] fopsum, fopsumi;
  logic [53:0] abs_fpsum;
  logic        neg;

  compound_adder #(.W(55)) u_sub (
    .a({1'b0, flp}), .b({1'b1, fsopa}), .sum(fopsum), .sum_p1(fopsumi)
  );
  assign neg       = fopsum[54];
  assign abs_fpsum = neg ? ~fopsum[53:0] : fopsumi[53:0];
  assign sign_n    = sl ^ neg;
  assign is_r2     = abs_fpsum[53];

  // ---------------- leading-one detection and normalisation ----------------
  logic [5:0] lodp;

  leading_one_detector #(.W(53), .CNT_W(6)) u_lod (
    .din(abs_fpsum[52:0]), .lz(lodp), .zero(zero_n)
  );

  barrel_shifter_r8 #(.WIDTH(53), .CTRL_BITS(6), .LEFT(1'b1)) u_norm (
    .din(abs_fpsum[52:0]), .amt(lodp), .fill(1'b0), .dout(mant_n)
  );

  assign exp_n = $signed({2'b00, el}) - 13'sd1 - $signed({7'd0, lodp});
endmodule
