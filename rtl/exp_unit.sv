// exp_unit: exponent adder of the multiplier and exponent subtractor of the
// divider.
//
// Three operands are reduced to two by a row of 3:2 compressors (a carry-save
// adder) and a compound prefix adder then returns both the result and the
// result plus one, so that the later normalisation step only has to select
// between two ready exponents. The structure follows the document.
//   SUBTRACT = 0 (multiplier): lo = e1 + e2 - 1023       (EXP_SUM)
//                              hi = e1 + e2 - 1023 + 1   (EXP_SUM_P1)
//   SUBTRACT = 1 (divider):    lo = e1 - e2 + 1023 - 1   (EXP_DIF_M1)
//                              hi = e1 - e2 + 1023       (EXP_DIF)
// For the divider the third CSA operand is ~e2, whose missing +1 is exactly
// the one that hi adds; this sharing is this design's choice. Results are
// 13-bit two's complement so that overflow and underflow stay visible.
// Combinational.
module exp_unit
  import fp_pkg::*;
#(
  parameter bit SUBTRACT = 1'b0
) (
  input  logic [EXP_W-1:0] e1,
  input  logic [EXP_W-1:0] e2,
  output logic [12:0]      lo,
  output logic [12:0]      hi
);
  localparam logic [12:0] K = SUBTRACT ? 13'(BIAS) : -13'(BIAS);

  logic [12:0] op_a, op_b, csa_s, csa_c;
  logic [13:0] sum, sum_p1;

  assign op_a = {2'b00, e1};
  assign op_b = SUBTRACT ? ~{2'b00, e2} : {2'b00, e2};

  // 3:2 compression: one row of full adders
  assign csa_s = op_a ^ op_b ^ K;
  assign csa_c = ((op_a & op_b) | (op_a & K) | (op_b & K)) << 1;

  compound_adder #(.W(13)) u_add (.a(csa_s), .b(csa_c), .sum(sum), .sum_p1(sum_p1));

  assign lo = sum[12:0];
  assign hi = sum_p1[12:0];
endmodule
