// tb_fp_divider: self-checking testbench for the double precision divider.
//
// Random operands are divided and compared with the simulator's real division
// (correctly rounded to nearest even): the default truncated unit must be
// within eight units in the last place (the reciprocal from two
// iterations on 54-bit words carries a few units of 2^-53 of error). Directed cases cover zero operands,
// overflow, underflow and all rounding modes; the start-to-done latency must
// be seven cycles.
`timescale 1ns/1ps
module tb_fp_divider;
  import fp_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   rst_n, start, busy, done;
  fp64_t  a, b, y;
  rmode_e rm;
  int checks = 0, failures = 0, n_exact = 0, n_left_norm = 0;

  fp_divider dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b), .rm(rm),
                  .busy(busy), .done(done), .y(y));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input fp64_t x, input fp64_t z, input rmode_e m);
    int cycles;
    @(negedge clk);
    a = x; b = z; rm = m; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    a = '0; b = '0;                    // operands are held inside the unit
    cycles = 0;
    while (!done && cycles < 20) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != 7) begin
      failures++;
      $display("FAIL latency %0d", cycles);
    end
  endtask

  task automatic check_near(input fp64_t x, input fp64_t z, input rmode_e m);
    logic [63:0] r, ulps;
    run(x, z, m);
    r = $realtobits($bitstoreal(x) / $bitstoreal(z));
    ulps = (y > r) ? y - r : r - y;
    checks++;
    if (ulps > 8 || y.sign != r[63]) begin
      failures++;
      $display("FAIL %h / %h rm=%0d got %h exp %h", x, z, m, y, r);
    end
    if (ulps == 0) n_exact++;
    if (x.frac < z.frac) n_left_norm++;
  endtask

  task automatic check_eq(input fp64_t x, input fp64_t z, input rmode_e m, input logic [63:0] e);
    run(x, z, m);
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL %h / %h rm=%0d got %h exp %h", x, z, m, y, e);
    end
  endtask

  initial begin
    fp64_t x, z;
    rst_n = 1'b0; start = 1'b0; a = '0; b = '0; rm = RM_NEAREST_EVEN;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check_near(64'h4008_0000_0000_0000, 64'h4008_0000_0000_0000, RM_NEAREST_EVEN);
    check_near(64'h4020_0000_0000_0000, 64'hC000_0000_0000_0000, RM_NEAREST_EVEN);
    check_eq(64'h0, 64'h4000_0000_0000_0000, RM_NEAREST_EVEN, 64'h0);
    check_eq(64'hBFF0_0000_0000_0000, 64'h0, RM_NEAREST_EVEN, 64'hFFF0_0000_0000_0000);
    for (int m = 0; m < 4; m++) begin
      check_eq(64'h7FE0_0000_0000_0000, 64'h3F00_0000_0000_0000, rmode_e'(m),
               overflow_result(rmode_e'(m), 1'b0));
      check_eq(64'h0010_0000_0000_0000, 64'h4100_0000_0000_0000, rmode_e'(m), 64'h0);
      check_near(64'h3FF0_0000_0000_0000, 64'h4008_0000_0000_0000, rmode_e'(m));
    end
    for (int i = 0; i < 1500; i++) begin
      x.sign = 1'($urandom); x.exp = 11'($urandom_range(512, 1535)); x.frac = {20'($urandom), $urandom};
      z.sign = 1'($urandom); z.exp = 11'($urandom_range(512, 1535)); z.frac = {20'($urandom), $urandom};
      check_near(x, z, RM_NEAREST_EVEN);
    end
    checks++;
    if (n_left_norm == 0) begin failures++; $display("FAIL no left normalisation seen"); end
    $display("correctly rounded results %0d of %0d", n_exact, 1504);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
