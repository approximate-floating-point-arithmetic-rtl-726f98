// tb_fp_adder: self-checking testbench for the dual-path double precision
// adder/subtractor.
//
// References come from the simulator's own double arithmetic: a+b in real
// arithmetic is the round-to-nearest-even result, and the exact rounding
// error of that sum (Knuth's TwoSum) tells which neighbour the directed
// rounding modes must return. Operands are random with exponent differences
// concentrated around -1..1 so that both paths are exercised; directed cases
// cover zeros, exact cancellation and overflow. A second and third instance
// run the approximate alignment shifters (54 bits; 4 control bits) and are
// checked against the error bounds those approximations allow.
`timescale 1ns/1ps
module tb_fp_adder;
  import fp_pkg::*;

  logic   clk = 1'b0;
  always #5 clk = ~clk;

  fp64_t  a, b, y, y54, y4;
  logic   sub, is_r, is_r54, is_r4;
  rmode_e rm;

  int checks = 0, failures = 0;
  int n_rpath = 0, n_npath = 0, n_approx_err = 0;

  fp_adder dut (.a(a), .b(b), .sub(sub), .rm(rm), .y(y), .is_r(is_r));
  fp_adder #(.RSHIFT_W(54)) dut54 (.a(a), .b(b), .sub(sub), .rm(RM_ZERO), .y(y54), .is_r(is_r54));
  fp_adder #(.CTRL_BITS(4)) dut4 (.a(a), .b(b), .sub(sub), .rm(rm), .y(y4), .is_r(is_r4));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] step(input logic [63:0] bits, input int dir_mag);
    // dir_mag = +1: one ulp larger magnitude, -1: one ulp smaller magnitude
    step = (dir_mag > 0) ? bits + 64'd1 : bits - 64'd1;
  endfunction

  // Expected result of a +/- b in mode m, from real arithmetic.
  function automatic logic [63:0] expected(input fp64_t x, input fp64_t z, input logic s,
                                           input rmode_e m);
    real ra, rb, rs, bb, err;
    logic [63:0] bits;
    ra   = $bitstoreal(x);
    rb   = s ? -$bitstoreal(z) : $bitstoreal(z);
    rs   = ra + rb;
    bb   = rs - ra;
    err  = (ra - (rs - bb)) + (rb - bb);
    bits = $realtobits(rs);
    if (rs == 0.0) return (m == RM_MINUS_INF) ? 64'h8000_0000_0000_0000 : 64'h0;
    unique case (m)
      RM_NEAREST_EVEN: ;
      RM_ZERO:      if (err != 0.0 && ((err > 0.0) != (rs > 0.0))) bits = step(bits, -1);
      RM_PLUS_INF:  if (err > 0.0) bits = step(bits, (rs > 0.0) ? 1 : -1);
      RM_MINUS_INF: if (err < 0.0) bits = step(bits, (rs > 0.0) ? -1 : 1);
    endcase
    return bits;
  endfunction

  function automatic logic [63:0] ulp_dist(input logic [63:0] p, input logic [63:0] q);
    if (p[63] != q[63]) return (p[62:0] == 0 && q[62:0] == 0) ? 0 : 64'hFFFF;
    return (p > q) ? p - q : q - p;
  endfunction

  task automatic apply(input fp64_t x, input fp64_t z, input logic s, input rmode_e m);
    logic [63:0] exp_bits, rz_bits;
    int d;
    a = x; b = z; sub = s; rm = m;
    @(posedge clk); #1;
    exp_bits = expected(x, z, s, m);
    checks++;
    if (y !== exp_bits) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h %s %h rm=%0d: got %h exp %h (is_r=%0b)", x, s ? "-" : "+", z, m, y,
                 exp_bits, is_r);
    end
    if (is_r) n_rpath++; else n_npath++;
    // 54-bit shifter, round to zero: at most one ulp from the exact RZ result.
    rz_bits = expected(x, z, s, RM_ZERO);
    checks++;
    if (ulp_dist(y54, rz_bits) > 1) begin
      failures++;
      $display("FAIL approx54 %h %h: got %h exp %h", x, z, y54, rz_bits);
    end
    if (y54 != rz_bits) n_approx_err++;
    // 4 control bits: exact while the total alignment shift (delta for A
    // larger, |delta| for B larger) stays within 16 and 15 positions.
    d = int'(x.exp) - int'(z.exp);
    if (d <= 16 && d >= -15) begin
      checks++;
      if (y4 !== exp_bits) begin
        failures++;
        $display("FAIL ctrl4 %h %h: got %h exp %h", x, z, y4, exp_bits);
      end
    end
  endtask

  function automatic fp64_t rnd_fp(input int e);
    fp64_t f;
    f.sign = 1'($urandom);
    f.exp  = 11'(e);
    f.frac = {20'($urandom), $urandom};
    return f;
  endfunction

  initial begin
    fp64_t x, z;
    int e, d, sel;
    a = '0; b = '0; sub = 1'b0; rm = RM_NEAREST_EVEN;
    @(posedge clk);
    // directed: 1 + 1, 1 - 1, x - x, zeros
    apply(64'h3FF0_0000_0000_0000, 64'h3FF0_0000_0000_0000, 1'b0, RM_NEAREST_EVEN);
    apply(64'h3FF0_0000_0000_0000, 64'h3FF0_0000_0000_0000, 1'b1, RM_NEAREST_EVEN);
    apply(64'h3FF0_0000_0000_0000, 64'h3FF0_0000_0000_0000, 1'b1, RM_MINUS_INF);
    apply(64'h4010_0000_0000_0001, 64'h4010_0000_0000_0000, 1'b1, RM_NEAREST_EVEN);
    apply(64'h0, 64'h4010_0000_0000_0001, 1'b1, RM_NEAREST_EVEN);
    apply(64'hC010_0000_0000_0001, 64'h0, 1'b0, RM_ZERO);
    apply(64'h3FF0_0000_0000_0000, 64'h3CA0_0000_0000_0000, 1'b0, RM_NEAREST_EVEN); // tie
    apply(64'h3FF0_0000_0000_0000, 64'h3CA0_0000_0000_0001, 1'b0, RM_NEAREST_EVEN);
    apply(64'h3FF0_0000_0000_0000, 64'h0010_0000_0000_0000, 1'b1, RM_ZERO);        // huge delta
    apply(64'h3FF0_0000_0000_0000, 64'h0010_0000_0000_0000, 1'b0, RM_PLUS_INF);
    for (int m = 0; m < 4; m++)
      apply(64'h3FFF_FFFF_FFFF_FFFF, 64'h3CAF_FFFF_FFFF_FFFF, 1'b0, rmode_e'(m)); // carry out
    // overflow
    for (int m = 0; m < 4; m++) begin
      a = 64'h7FEF_FFFF_FFFF_FFFF; b = 64'h7FE0_0000_0000_0000; sub = 1'b0; rm = rmode_e'(m);
      @(posedge clk); #1;
      checks++;
      if (y !== overflow_result(rmode_e'(m), 1'b0)) begin
        failures++;
        $display("FAIL overflow rm=%0d got %h", m, y);
      end
    end
    // random operands
    for (int i = 0; i < 30000; i++) begin
      e   = 600 + int'($urandom_range(0, 800));
      sel = int'($urandom_range(0, 9));
      if (sel < 5)      d = int'($urandom_range(0, 2)) - 1;
      else if (sel < 9) d = int'($urandom_range(0, 140)) - 70;
      else              d = int'($urandom_range(0, 400)) - 200;
      x = rnd_fp(e);
      z = rnd_fp(e - d);
      if (sel == 0) z.frac = x.frac ^ 52'(1 << $urandom_range(0, 51)); // heavy cancellation
      apply(x, z, 1'($urandom), rmode_e'($urandom_range(0, 3)));
    end
    checks++;
    if (n_rpath == 0 || n_npath == 0) begin
      failures++;
      $display("FAIL path coverage r=%0d n=%0d", n_rpath, n_npath);
    end
    $display("R-path results %0d, N-path results %0d, 54-bit shifter off by one ulp %0d times",
             n_rpath, n_npath, n_approx_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
