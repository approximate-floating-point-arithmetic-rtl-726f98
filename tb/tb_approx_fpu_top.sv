// tb_approx_fpu_top: end-to-end test of the three units at their default
// (proposed approximate) configurations.
//
// A stream of random operations drives the adder, the multiplier and the
// divider through the top's ports at the same time; every result is compared
// with real arithmetic within the error bound of its unit (adder: exact;
// multiplier with 46 truncated columns: one unit in the last place; divider:
// eight units in the last place). The test counts how often each mechanism
// of the design occurs and fails if one never does: R-path and N-path
// selection, the fixed big-exponent-difference alignment, the one-position
// normalisation of the R-path sum, an exact cancellation, a multiplier
// product needing the right normalisation, an inexact truncated product, a
// divider quotient needing the left normalisation, a division issued back to
// back, overflow and underflow.
`timescale 1ns/1ps
module tb_approx_fpu_top;
  import fp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   rst_n;
  fp64_t  add_a, add_b, add_y, mul_a, mul_b, mul_y, div_a, div_b, div_y;
  logic   add_sub, add_is_r, div_start, div_busy, div_done;
  rmode_e add_rm, mul_rm, div_rm;

  int checks = 0, failures = 0;
  int n_rpath = 0, n_npath = 0, n_big = 0, n_rnorm = 0, n_cancel = 0;
  int n_mul_norm = 0, n_mul_trunc = 0, n_div_left = 0, n_div_b2b = 0, n_ovf = 0, n_unf = 0;

  approx_fpu_top dut (
    .clk(clk), .rst_n(rst_n),
    .add_a(add_a), .add_b(add_b), .add_sub(add_sub), .add_rm(add_rm), .add_y(add_y),
    .add_is_r(add_is_r),
    .mul_a(mul_a), .mul_b(mul_b), .mul_rm(mul_rm), .mul_y(mul_y),
    .div_start(div_start), .div_a(div_a), .div_b(div_b), .div_rm(div_rm),
    .div_busy(div_busy), .div_done(div_done), .div_y(div_y)
  );

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] bits_dist(input logic [63:0] p, input logic [63:0] q);
    if (p[63] != q[63]) return (p[62:0] == 0 && q[62:0] == 0) ? 64'd0 : 64'hFFFF;
    return (p > q) ? p - q : q - p;
  endfunction

  function automatic fp64_t rnd_fp(input int e);
    fp64_t f;
    f.sign = 1'($urandom);
    f.exp  = 11'(e);
    f.frac = {20'($urandom), $urandom};
    return f;
  endfunction

  // ---------------- adder and multiplier: one operation per cycle ----------------
  task automatic add_mul_op(input fp64_t x, input fp64_t z, input logic s,
                            input fp64_t u, input fp64_t v);
    logic [63:0] r;
    real ra, rb;
    int d;
    add_a = x; add_b = z; add_sub = s; add_rm = RM_NEAREST_EVEN;
    mul_a = u; mul_b = v; mul_rm = RM_NEAREST_EVEN;
    @(posedge clk); #1;
    ra = $bitstoreal(x);
    rb = s ? -$bitstoreal(z) : $bitstoreal(z);
    r  = $realtobits(ra + rb);
    if (r[62:0] == 0) begin r = 64'd0; n_cancel++; end
    checks++;
    if (add_y !== r) begin
      failures++;
      if (failures < 10) $display("FAIL add %h %s %h got %h exp %h", x, s ? "-" : "+", z, add_y, r);
    end
    d = int'(x.exp) - int'(z.exp);
    if (add_is_r) n_rpath++; else n_npath++;
    if (add_is_r && (d >= 65 || d <= -64)) n_big++;
    if (add_is_r && (x.sign ^ z.sign ^ s) == 1'b0 &&
        r[62:52] == ((d >= 0 ? x.exp : z.exp) + 11'd1)) n_rnorm++;
    if (r[62:52] == 11'h7FF) n_ovf++;
    r = $realtobits($bitstoreal(u) * $bitstoreal(v));
    checks++;
    if (r[62:52] == 11'h7FF) begin
      n_ovf++;
      if (mul_y !== r) begin failures++; $display("FAIL mul overflow got %h", mul_y); end
    end else if (r[62:52] == 0) begin
      n_unf++;
      if (mul_y[62:0] !== 63'd0) begin failures++; $display("FAIL mul underflow got %h", mul_y); end
    end else begin
      if (bits_dist(mul_y, r) > 1) begin
        failures++;
        $display("FAIL mul %h * %h got %h exp %h", u, v, mul_y, r);
      end
      if (mul_y !== r) n_mul_trunc++;
      if (mul_y[62:52] == 11'(int'(u.exp) + int'(v.exp) - 1022)) n_mul_norm++;
    end
  endtask

  // ---------------- divider: back-to-back operations ----------------
  task automatic div_op(input fp64_t x, input fp64_t z);
    logic [63:0] r;
    int cycles;
    // called at a falling edge; when the previous result is being delivered
    // this cycle, the new start follows it back to back
    if (div_done) n_div_b2b++;
    div_a = x; div_b = z; div_rm = RM_NEAREST_EVEN; div_start = 1'b1;
    @(negedge clk);
    div_start = 1'b0;
    cycles = 0;
    while (!div_done && cycles < 20) begin
      @(negedge clk);
      cycles++;
    end
    r = $realtobits($bitstoreal(x) / $bitstoreal(z));
    checks += 2;
    if (cycles != 7) begin failures++; $display("FAIL divider latency %0d", cycles); end
    if (r[62:52] == 0) begin
      n_unf++;
      if (div_y[62:0] !== 63'd0) begin failures++; $display("FAIL div underflow got %h", div_y); end
    end else if (bits_dist(div_y, r) > 8) begin
      failures++;
      $display("FAIL div %h / %h got %h exp %h", x, z, div_y, r);
    end
    if (x.frac < z.frac) n_div_left++;
  endtask

  initial begin
    fp64_t x, z;
    int e, d, sel;
    rst_n = 1'b0; div_start = 1'b0;
    add_a = '0; add_b = '0; add_sub = 1'b0; add_rm = RM_NEAREST_EVEN;
    mul_a = '0; mul_b = '0; mul_rm = RM_NEAREST_EVEN;
    div_a = '0; div_b = '0; div_rm = RM_NEAREST_EVEN;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      begin : adder_multiplier_stream
        add_mul_op(64'h4010_0000_0000_0001, 64'h4010_0000_0000_0001, 1'b1,
                   64'h7FE0_0000_0000_0000, 64'h4000_0000_0000_0000);
        add_mul_op(64'h7FEF_FFFF_FFFF_FFFF, 64'h7FEF_FFFF_FFFF_FFFF, 1'b0,
                   64'h0010_0000_0000_0000, 64'h3000_0000_0000_0000);
        for (int i = 0; i < 20000; i++) begin
          e   = 600 + int'($urandom_range(0, 800));
          sel = int'($urandom_range(0, 9));
          if (sel < 4)      d = int'($urandom_range(0, 2)) - 1;
          else if (sel < 9) d = int'($urandom_range(0, 140)) - 70;
          else              d = int'($urandom_range(0, 400)) - 200;
          x = rnd_fp(e);
          z = rnd_fp(e - d);
          add_mul_op(x, z, 1'($urandom), rnd_fp(int'($urandom_range(512, 1535))),
                     rnd_fp(int'($urandom_range(512, 1535))));
        end
      end
      begin : divider_stream
        @(negedge clk);
        div_op(64'h0010_0000_0000_0000, 64'h4100_0000_0000_0000);
        for (int i = 0; i < 1500; i++)
          div_op(rnd_fp(int'($urandom_range(512, 1535))), rnd_fp(int'($urandom_range(512, 1535))));
      end
    join
    $display("adder: R-path %0d, N-path %0d, big shift %0d, R normalisation %0d, cancellations %0d",
             n_rpath, n_npath, n_big, n_rnorm, n_cancel);
    $display("multiplier: right normalisations %0d, products off by one ulp %0d",
             n_mul_norm, n_mul_trunc);
    $display("divider: left normalisations %0d, back-to-back starts %0d", n_div_left, n_div_b2b);
    $display("overflows %0d, underflows %0d", n_ovf, n_unf);
    checks++;
    if (n_rpath == 0 || n_npath == 0 || n_big == 0 || n_rnorm == 0 || n_cancel == 0 ||
        n_mul_norm == 0 || n_mul_trunc == 0 || n_div_left == 0 || n_div_b2b == 0 ||
        n_ovf == 0 || n_unf == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
