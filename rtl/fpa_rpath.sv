// fpa_rpath: R-path of the dual-path floating-point adder.
//
// The R-path handles every effective addition, and every effective
// subtraction whose exponent difference is at least two or whose preshifted
// significand sum lies in [2,4). In all those cases the significand sum is
// positive and needs at most a one-position right normalisation.
//
// Steps, as in the document's R-path diagram:
//  * Exponent difference: the one's-complement lazy difference ea + ~eb gives
//    SIGN_BIG and a magnitude MAG that is delta-1 for delta >= 1 and |delta|
//    for delta <= 0. IS_BIG flags delta >= 65 or delta <= -64; MAG_MED is the
//    low six bits.
//  * One's complement, preshift and Align1: for an effective subtraction both
//    significands are inverted (FAO/FBO) and preshifted left by one; the small
//    one is then placed in the 55-bit FSOP' frame according to the
//    SIGN_MED / S_EFF table, which also absorbs the missing 1 of the lazy
//    difference.
//  * Align2: a radix-8 barrel shifter of RSHIFT_W bits shifts right by
//    MAG_MED, filling with S_EFF; for IS_BIG a fixed 64-position shift is
//    wired instead.
//  * G, R, S generation, compound addition of the large and the small
//    operand (sum + 1 is taken for a subtraction to complete the two's
//    complement), post-normalisation by at most one position and rounding in
//    the four IEEE modes.
//
// Design choices beyond the document: the sticky bit of an effective
// subtraction is the AND of the inverted shifted-out bits (the complement of
// the OR of the true bits), so the two's complement of {G,R,S} stays correct;
// rounding selects between the mantissa and its increment from a second
// compound adder. The approximate configurations of the document are the
// parameters RSHIFT_W = 54 (no round and sticky bits computed) and
// CTRL_BITS < 6 (shift amount saturated at 2^CTRL_BITS - 1, so the total
// right shift is at most 2^CTRL_BITS). Combinational.
module fpa_rpath
  import fp_pkg::*;
#(
  parameter int unsigned RSHIFT_W  = 118,
  parameter int unsigned CTRL_BITS = 6
) (
  input  logic              sa,
  input  logic [EXP_W-1:0]  ea,
  input  logic [FRAC_W-1:0] fa,
  input  logic              sb,        // sign of B after add/sub
  input  logic [EXP_W-1:0]  eb,
  input  logic [FRAC_W-1:0] fb,
  input  rmode_e            rm,
  output logic              s_eff,
  output logic              is_r1,     // |delta| >= 2
  output logic              sign_r,
  output logic [12:0]       exp_r,     // biased exponent, may exceed 2046
  output logic [52:0]       mant_r     // rounded significand with hidden one
);
  localparam int unsigned FW = 118;

  // ---------------- exponent difference ----------------
  logic [12:0] ediff_sum, ediff_sum_p1;
  logic [11:0] ediff;
  logic        sign_big, is_big;
  logic [10:0] mag;
  logic [5:0]  mag_med;

  compound_adder #(.W(12)) u_expdiff (
    .a({1'b0, ea}), .b({1'b1, ~eb}), .sum(ediff_sum), .sum_p1(ediff_sum_p1)
  );
  assign ediff    = ediff_sum[11:0];          // ea - eb - 1 (mod 2^12)
  assign sign_big = ediff[11];
  assign mag      = sign_big ? ~ediff[10:0] : ediff[10:0];
  assign is_big   = |mag[10:6];
  assign mag_med  = mag[5:0];
  assign is_r1    = is_big | (|mag_med[5:1]) | (mag_med[0] & ~sign_big);

  // ---------------- one's complement, swap, preshift, Align1 ----------------
  logic [52:0] fa_m, fb_m, fao, fbo, fso, fl;
  logic [54:0] fsop_pre;

  assign fa_m  = {1'b1, fa};
  assign fb_m  = {1'b1, fb};
  assign s_eff = sa ^ sb;
  assign fao   = s_eff ? ~fa_m : fa_m;
  assign fbo   = s_eff ? ~fb_m : fb_m;
  assign fso   = sign_big ? fao : fbo;        // small operand
  assign fl    = sign_big ? fb_m : fa_m;      // large operand

  always_comb begin
    unique case ({sign_big, s_eff})
      2'b00: fsop_pre = {2'b00, fso};         // accumulated right shift 1
      2'b01: fsop_pre = {1'b1, fso, 1'b1};    // accumulated right shift 0
      2'b10: fsop_pre = {1'b0, fso, 1'b0};    // accumulated right shift 0
      default: fsop_pre = {fso, 2'b11};       // accumulated left shift 1
    endcase
  end

  // ---------------- Align2 ----------------
  logic [CTRL_BITS-1:0] amt;
  logic [FW-1:0]        frame, fsopa_med, fsopa_big, fsopa;
  logic [RSHIFT_W-1:0]  shifted;

  if (CTRL_BITS < 6) begin : g_sat
    assign amt = (mag_med >= 6'(1 << CTRL_BITS)) ? '1 : mag_med[CTRL_BITS-1:0];
  end else begin : g_full
    assign amt = mag_med;
  end

  assign frame = {fsop_pre, {(FW-55){s_eff}}};

  barrel_shifter_r8 #(.WIDTH(RSHIFT_W), .CTRL_BITS(CTRL_BITS), .LEFT(1'b0)) u_align2 (
    .din(frame[FW-1 -: RSHIFT_W]), .amt(amt), .fill(s_eff), .dout(shifted)
  );

  if (RSHIFT_W < FW) begin : g_narrow
    assign fsopa_med = {shifted, {(FW-RSHIFT_W){s_eff}}};
  end else begin : g_wide
    assign fsopa_med = shifted;
  end

  assign fsopa_big = {{65{s_eff}}, fso};
  assign fsopa     = is_big ? fsopa_big : fsopa_med;

  // ---------------- G, R, S and compound addition ----------------
  logic        g_bit, r_bit, s_bit;
  logic [55:0] fsop, flop;
  logic [56:0] sum, sum_p1, fsum;

  assign g_bit = fsopa[64];
  assign r_bit = fsopa[63];
  assign s_bit = s_eff ? (&fsopa[62:0]) : (|fsopa[62:0]);
  assign fsop  = {fsopa[117:65], g_bit, r_bit, s_bit};
  assign flop  = s_eff ? {fl, 3'b000} : {1'b0, fl, 2'b00};

  compound_adder #(.W(56)) u_sigadd (.a(flop), .b(fsop), .sum(sum), .sum_p1(sum_p1));
  assign fsum = s_eff ? sum_p1 : sum;

  // ---------------- post-normalisation and rounding ----------------
  logic        hi, rnd, sticky, inc;
  logic [52:0] mant_t;
  logic [53:0] m_sum, m_sum_p1;
  logic [10:0] el;

  assign hi     = fsum[55];
  assign mant_t = hi ? fsum[55:3] : fsum[54:2];
  assign rnd    = hi ? fsum[2] : fsum[1];
  assign sticky = hi ? (|fsum[1:0]) : fsum[0];
  assign sign_r = sign_big ? sb : sa;
  assign el     = sign_big ? eb : ea;
  assign inc    = round_up(rm, sign_r, mant_t[0], rnd, sticky);

  compound_adder #(.W(53)) u_round (.a(mant_t), .b('0), .sum(m_sum), .sum_p1(m_sum_p1));

  always_comb begin
    exp_r = {2'b00, el} + {12'd0, hi} - {12'd0, s_eff};
    if (inc && m_sum_p1[53]) begin
      mant_r = m_sum_p1[53:1];
      exp_r  = exp_r + 13'd1;
    end else begin
      mant_r = inc ? m_sum_p1[52:0] : m_sum[52:0];
    end
  end
endmodule
