// approx_fpu_top: the three approximate double precision units side by side.
//
// The adder/subtractor (dual R/N path, radix-8 alignment shifter), the
// multiplier (truncated array multiplier, 46 truncated columns) and the
// divider (Newton-Raphson on a shared truncated 54 x 54 array multiplier, 48
// truncated columns, seven cycles) are independent units; each keeps its own
// ports. The adder and multiplier are combinational; the divider is clocked
// and uses a start/busy/done handshake.
// Parameters pass the approximation settings down: ADD_RSHIFT_W and
// ADD_CTRL_BITS (adder alignment shifter width and control bits), MUL_TRUNC_H
// and DIV_TRUNC_H (truncated multiplier columns). The defaults are the
// configurations the document proposes; putting the three units under one
// top is this design's choice.
module approx_fpu_top
  import fp_pkg::*;
#(
  parameter int unsigned ADD_RSHIFT_W  = 118,
  parameter int unsigned ADD_CTRL_BITS = 6,
  parameter int unsigned MUL_TRUNC_H   = 46,
  parameter int unsigned DIV_TRUNC_H   = 48
) (
  input  logic   clk,
  input  logic   rst_n,
  // adder / subtractor
  input  fp64_t  add_a,
  input  fp64_t  add_b,
  input  logic   add_sub,
  input  rmode_e add_rm,
  output fp64_t  add_y,
  output logic   add_is_r,
  // multiplier
  input  fp64_t  mul_a,
  input  fp64_t  mul_b,
  input  rmode_e mul_rm,
  output fp64_t  mul_y,
  // divider
  input  logic   div_start,
  input  fp64_t  div_a,
  input  fp64_t  div_b,
  input  rmode_e div_rm,
  output logic   div_busy,
  output logic   div_done,
  output fp64_t  div_y
);
  fp_adder #(.RSHIFT_W(ADD_RSHIFT_W), .CTRL_BITS(ADD_CTRL_BITS)) u_add (
    .a(add_a), .b(add_b), .sub(add_sub), .rm(add_rm), .y(add_y), .is_r(add_is_r)
  );

  fp_multiplier #(.TRUNC_H(MUL_TRUNC_H)) u_mul (
    .a(mul_a), .b(mul_b), .rm(mul_rm), .y(mul_y)
  );

  fp_divider #(.TRUNC_H(DIV_TRUNC_H)) u_div (
    .clk(clk), .rst_n(rst_n), .start(div_start), .a(div_a), .b(div_b), .rm(div_rm),
    .busy(div_busy), .done(div_done), .y(div_y)
  );
endmodule
