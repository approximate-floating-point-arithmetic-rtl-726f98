// fp_pkg: types and constants shared by the floating-point adder, multiplier
// and divider.
//
// All three units work on IEEE 754 double precision words (1 sign bit,
// 11 exponent bits with bias 1023, 52 stored fraction bits plus a hidden one).
// The rounding-mode encoding below is this design's own choice; the four modes
// themselves (round to zero, to nearest even, towards plus and minus infinity)
// are the standard IEEE ones.
package fp_pkg;

  localparam int unsigned EXP_W  = 11;
  localparam int unsigned FRAC_W = 52;
  localparam int unsigned MANT_W = 53;           // hidden one + fraction
  localparam int unsigned BIAS   = 1023;
  localparam logic [EXP_W-1:0] EXP_MAX = '1;     // infinity exponent

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp64_t;

  typedef enum logic [1:0] {
    RM_NEAREST_EVEN = 2'b00,
    RM_ZERO         = 2'b01,
    RM_PLUS_INF     = 2'b10,
    RM_MINUS_INF    = 2'b11
  } rmode_e;

  // Decide whether a truncated magnitude is to be incremented, given its
  // least significant kept bit, the round bit, the sticky bit and the sign.
  function automatic logic round_up(input rmode_e rm, input logic sign,
                                    input logic lsb, input logic rnd,
                                    input logic sticky);
    unique case (rm)
      RM_NEAREST_EVEN: round_up = rnd & (sticky | lsb);
      RM_ZERO:         round_up = 1'b0;
      RM_PLUS_INF:     round_up = ~sign & (rnd | sticky);
      RM_MINUS_INF:    round_up = sign & (rnd | sticky);
      default:         round_up = 1'b0;
    endcase
  endfunction

  // Result of an exponent overflow: infinity, or the largest finite number
  // when the rounding mode points away from infinity of that sign.
  function automatic fp64_t overflow_result(input rmode_e rm, input logic sign);
    logic to_inf;
    to_inf = (rm == RM_NEAREST_EVEN) || (rm == RM_PLUS_INF && !sign) ||
             (rm == RM_MINUS_INF && sign);
    overflow_result.sign = sign;
    overflow_result.exp  = to_inf ? EXP_MAX : EXP_MAX - 1'b1;
    overflow_result.frac = to_inf ? '0 : '1;
  endfunction

endpackage
