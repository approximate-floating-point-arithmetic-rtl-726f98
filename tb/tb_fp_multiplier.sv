// tb_fp_multiplier: self-checking testbench for the double precision
// multiplier.
//
// The reference rounds the exact 106-bit significand product (formed with a
// wide integer multiply) in each rounding mode; round-to-nearest-even results
// are also compared with the simulator's real multiplication. An exact
// instance (TRUNC_H = 0) must match bit for bit; the default truncated
// instance (TRUNC_H = 46) must stay within one unit in the last place.
// Directed cases cover overflow, underflow, zero operands and rounding carry.
`timescale 1ns/1ps
module tb_fp_multiplier;
  import fp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  fp64_t  a, b, y_exact, y_trunc;
  rmode_e rm;
  int checks = 0, failures = 0, n_trunc_diff = 0, n_norm_shift = 0, n_ovf = 0, n_unf = 0;

  fp_multiplier #(.TRUNC_H(0)) dut_exact (.a(a), .b(b), .rm(rm), .y(y_exact));
  fp_multiplier dut_trunc (.a(a), .b(b), .rm(rm), .y(y_trunc));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] ref_mul(input fp64_t x, input fp64_t z, input rmode_e m);
    logic [127:0] prod;
    logic [52:0]  mant;
    logic         r, st, s, up;
    int           e;
    s = x.sign ^ z.sign;
    if (x.exp == 0 || z.exp == 0) return {s, 63'd0};
    prod = {75'd0, 1'b1, x.frac} * {75'd0, 1'b1, z.frac};
    e = int'(x.exp) + int'(z.exp) - 1023;
    if (prod[105]) begin
      e++;
      mant = prod[105:53]; r = prod[52]; st = |prod[51:0];
    end else begin
      mant = prod[104:52]; r = prod[51]; st = |prod[50:0];
    end
    case (m)
      RM_NEAREST_EVEN: up = r && (st || mant[0]);
      RM_ZERO:         up = 0;
      RM_PLUS_INF:     up = !s && (r || st);
      default:         up = s && (r || st);
    endcase
    if (up) begin
      if (mant == '1) begin mant = 53'h10_0000_0000_0000; e++; end
      else mant++;
    end
    if (e <= 0) return {s, 63'd0};
    if (e >= 2047) return overflow_result(m, s);
    return {s, 11'(e), mant[51:0]};
  endfunction

  task automatic apply(input fp64_t x, input fp64_t z, input rmode_e m);
    logic [63:0] r, d;
    a = x; b = z; rm = m;
    @(posedge clk); #1;
    r = ref_mul(x, z, m);
    checks++;
    if (y_exact !== r) begin
      failures++;
      if (failures < 10) $display("FAIL exact %h * %h rm=%0d got %h exp %h", x, z, m, y_exact, r);
    end
    if (m == RM_NEAREST_EVEN && r[62:52] != 0 && r[62:52] != 11'h7FF) begin
      checks++;
      if (y_exact !== $realtobits($bitstoreal(x) * $bitstoreal(z))) begin
        failures++;
        $display("FAIL real %h * %h got %h", x, z, y_exact);
      end
    end
    d = (y_trunc > r) ? y_trunc - r : r - y_trunc;
    checks++;
    if (d > 1) begin
      failures++;
      if (failures < 10) $display("FAIL trunc %h * %h got %h exp %h", x, z, y_trunc, r);
    end
    if (d != 0) n_trunc_diff++;
    if ((({75'd0, 1'b1, x.frac} * {75'd0, 1'b1, z.frac}) >> 105) != 0) n_norm_shift++;
    if (r[62:52] == 11'h7FF || r[62:0] == 63'h7FEF_FFFF_FFFF_FFFF) n_ovf++;
    if (r[62:0] == 0 && x.exp != 0 && z.exp != 0) n_unf++;
  endtask

  initial begin
    fp64_t x, z;
    a = '0; b = '0; rm = RM_NEAREST_EVEN;
    @(posedge clk);
    apply(64'h3FF0_0000_0000_0000, 64'h3FF0_0000_0000_0000, RM_NEAREST_EVEN);
    apply(64'h3FFF_FFFF_FFFF_FFFF, 64'h3FFF_FFFF_FFFF_FFFF, RM_PLUS_INF);
    apply(64'h3FFF_FFFF_FFFF_FFFF, 64'h3FF0_0000_0000_0001, RM_NEAREST_EVEN);
    apply(64'h0, 64'h4000_0000_0000_0000, RM_NEAREST_EVEN);
    for (int m = 0; m < 4; m++) begin
      apply(64'h7FE0_0000_0000_0000, 64'h4010_0000_0000_0000, rmode_e'(m));   // overflow
      apply(64'hFFE0_0000_0000_0000, 64'h4010_0000_0000_0000, rmode_e'(m));
      apply(64'h0020_0000_0000_0000, 64'h3C00_0000_0000_0000, rmode_e'(m));   // underflow
    end
    for (int i = 0; i < 4000; i++) begin
      x.sign = 1'($urandom); x.exp = 11'($urandom_range(512, 1535)); x.frac = {20'($urandom), $urandom};
      z.sign = 1'($urandom); z.exp = 11'($urandom_range(512, 1535)); z.frac = {20'($urandom), $urandom};
      apply(x, z, rmode_e'($urandom_range(0, 3)));
    end
    checks++;
    if (n_norm_shift == 0 || n_ovf == 0 || n_unf == 0) begin
      failures++;
      $display("FAIL coverage norm=%0d ovf=%0d unf=%0d", n_norm_shift, n_ovf, n_unf);
    end
    $display("truncated multiplier differed by one ulp in %0d cases", n_trunc_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
