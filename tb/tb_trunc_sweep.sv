// tb_trunc_sweep: accuracy sweep over the approximation parameters.
//
// Measures how the error of each unit grows as its approximation is made
// more aggressive, and checks that it stays within its bounds:
//   * fp_multiplier with TRUNC_H = 0, 46, 48, 50, 52 on 2000 random operand
//     pairs: the exact instance must be bit exact, TRUNC_H = 46 within one
//     ulp; the mean error must not shrink as more columns are dropped.
//   * fp_divider with TRUNC_H = 48, 50, 52 on 500 random divisions: within
//     eight ulp at 48, mean error non-decreasing with TRUNC_H.
//   * fp_adder with CTRL_BITS = 3..6 on 2000 random pairs whose exponent
//     difference spans 0..70: six control bits must be exact, and fewer
//     bits must give errors once the difference leaves the shift window.
// The reference is the simulator's real arithmetic, rounded to nearest even,
// and all units run in that mode. Per configuration the number of exact
// results, the mean and the maximum distance in ulp are printed. The error
// distance is the difference of the two results read as integers, which
// counts ulp for results of the same sign; it is capped at 2^20.
// All units are driven from one clock; the divider uses its start/done
// handshake and the three divider instances run in lockstep.
`timescale 1ns/1ps
module tb_trunc_sweep;
  import fp_pkg::*;

  localparam int NMUL = 5;
  localparam int MUL_H [NMUL] = '{0, 46, 48, 50, 52};
  localparam int NDIV = 3;
  localparam int DIV_H [NDIV] = '{48, 50, 52};
  localparam int NADD = 4;
  localparam int ADD_N [NADD] = '{3, 4, 5, 6};
  localparam longint CAP = 64'd1 << 20;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  fp64_t a, b;
  logic  rst_n, start;
  fp64_t y_mul [NMUL];
  fp64_t y_div [NDIV];
  logic  done_div [NDIV];
  fp64_t y_add [NADD];

  for (genvar i = 0; i < NMUL; i++) begin : g_mul
    fp_multiplier #(.TRUNC_H(MUL_H[i])) u_mul (.a(a), .b(b), .rm(RM_NEAREST_EVEN), .y(y_mul[i]));
  end
  for (genvar i = 0; i < NDIV; i++) begin : g_div
    logic busy;
    fp_divider #(.TRUNC_H(DIV_H[i])) u_div (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
      .rm(RM_NEAREST_EVEN), .busy(busy), .done(done_div[i]), .y(y_div[i]));
  end
  for (genvar i = 0; i < NADD; i++) begin : g_add
    logic is_r;
    fp_adder #(.CTRL_BITS(ADD_N[i])) u_add (.a(a), .b(b), .sub(1'b0), .rm(RM_NEAREST_EVEN),
      .y(y_add[i]), .is_r(is_r));
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ulp_dist(input fp64_t x, input fp64_t r);
    longint d;
    d = (x > r) ? longint'(x - r) : longint'(r - x);
    return (d > CAP) ? CAP : d;
  endfunction

  function automatic fp64_t rand_fp(input int emin, input int emax);
    fp64_t x;
    x.sign = 1'($urandom);
    x.exp  = 11'($urandom_range(emin, emax));
    x.frac = {20'($urandom), $urandom};
    return x;
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  real    mul_sum [NMUL], div_sum [NDIV], add_sum [NADD];
  longint mul_max [NMUL], div_max [NDIV], add_max [NADD];
  int     mul_ok  [NMUL], div_ok  [NDIV], add_ok  [NADD];

  initial begin
    fp64_t  r;
    longint d;
    localparam int NM = 2000, ND = 500, NA = 2000;
    for (int i = 0; i < NMUL; i++) begin mul_sum[i] = 0.0; mul_max[i] = 0; mul_ok[i] = 0; end
    for (int i = 0; i < NDIV; i++) begin div_sum[i] = 0.0; div_max[i] = 0; div_ok[i] = 0; end
    for (int i = 0; i < NADD; i++) begin add_sum[i] = 0.0; add_max[i] = 0; add_ok[i] = 0; end
    rst_n = 1'b0; start = 1'b0; a = '0; b = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // multiplier
    for (int n = 0; n < NM; n++) begin
      a = rand_fp(768, 1279); b = rand_fp(768, 1279);
      #1;
      r = $realtobits($bitstoreal(a) * $bitstoreal(b));
      for (int i = 0; i < NMUL; i++) begin
        d = ulp_dist(y_mul[i], r);
        mul_sum[i] += real'(d);
        if (d > mul_max[i]) mul_max[i] = d;
        if (d == 0) mul_ok[i]++;
      end
    end

    // divider, three instances in lockstep
    for (int n = 0; n < ND; n++) begin
      @(negedge clk);
      a = rand_fp(768, 1279); b = rand_fp(768, 1279); start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!done_div[0]) @(negedge clk);
      r = $realtobits($bitstoreal(a) / $bitstoreal(b));
      for (int i = 0; i < NDIV; i++) begin
        d = ulp_dist(y_div[i], r);
        div_sum[i] += real'(d);
        if (d > div_max[i]) div_max[i] = d;
        if (d == 0) div_ok[i]++;
      end
    end

    // adder, same-sign operands with exponent difference 0..70
    for (int n = 0; n < NA; n++) begin
      a = rand_fp(900, 1100);
      b = rand_fp(0, 0);
      b.sign = a.sign;
      b.exp = a.exp - 11'($urandom_range(0, 70));
      if ($urandom_range(0, 1) == 1) begin fp64_t t; t = a; a = b; b = t; end
      #1;
      r = $realtobits($bitstoreal(a) + $bitstoreal(b));
      for (int i = 0; i < NADD; i++) begin
        d = ulp_dist(y_add[i], r);
        add_sum[i] += real'(d);
        if (d > add_max[i]) add_max[i] = d;
        if (d == 0) add_ok[i]++;
      end
    end

    for (int i = 0; i < NMUL; i++)
      $display("multiplier TRUNC_H=%0d: exact %0d/%0d mean %f ulp max %0d ulp",
               MUL_H[i], mul_ok[i], NM, mul_sum[i] / NM, mul_max[i]);
    for (int i = 0; i < NDIV; i++)
      $display("divider    TRUNC_H=%0d: exact %0d/%0d mean %f ulp max %0d ulp",
               DIV_H[i], div_ok[i], ND, div_sum[i] / ND, div_max[i]);
    for (int i = 0; i < NADD; i++)
      $display("adder    CTRL_BITS=%0d: exact %0d/%0d mean %f ulp max %0d ulp",
               ADD_N[i], add_ok[i], NA, add_sum[i] / NA, add_max[i]);

    check("exact multiplier", mul_max[0] == 0);
    check("TRUNC_H=46 multiplier within 1 ulp", mul_max[1] <= 1);
    for (int i = 1; i < NMUL; i++)
      check("multiplier error grows with TRUNC_H", mul_sum[i] >= mul_sum[i-1]);
    check("TRUNC_H=48 divider within 8 ulp", div_max[0] <= 8);
    for (int i = 1; i < NDIV; i++)
      check("divider error grows with TRUNC_H", div_sum[i] >= div_sum[i-1]);
    check("six-bit adder exact", add_max[NADD-1] == 0);
    check("three-bit adder misaligns", add_ok[0] < NA);
    for (int i = 1; i < NADD; i++)
      check("adder exact count grows with CTRL_BITS", add_ok[i] >= add_ok[i-1]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
