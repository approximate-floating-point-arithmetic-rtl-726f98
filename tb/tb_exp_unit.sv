// tb_exp_unit: checks both configurations of the exponent unit against
// integer arithmetic over random and corner exponents.
`timescale 1ns/1ps
module tb_exp_unit;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [10:0] e1, e2;
  logic [12:0] m_lo, m_hi, d_lo, d_hi;
  int checks = 0, failures = 0;

  exp_unit dut_mul (.e1(e1), .e2(e2), .lo(m_lo), .hi(m_hi));
  exp_unit #(.SUBTRACT(1'b1)) dut_div (.e1(e1), .e2(e2), .lo(d_lo), .hi(d_hi));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int a, input int b);
    int s, d;
    e1 = 11'(a); e2 = 11'(b);
    @(posedge clk); #1;
    s = a + b - 1023;
    d = a - b + 1023;
    checks += 4;
    if ($signed(m_lo) != s)     begin failures++; $display("FAIL mul lo %0d %0d", a, b); end
    if ($signed(m_hi) != s + 1) begin failures++; $display("FAIL mul hi %0d %0d", a, b); end
    if ($signed(d_hi) != d)     begin failures++; $display("FAIL div hi %0d %0d", a, b); end
    if ($signed(d_lo) != d - 1) begin failures++; $display("FAIL div lo %0d %0d", a, b); end
  endtask

  initial begin
    e1 = '0; e2 = '0;
    @(posedge clk);
    check(0, 0); check(2047, 2047); check(1, 2046); check(2046, 1); check(1023, 1023);
    for (int i = 0; i < 5000; i++) check(int'($urandom_range(0, 2047)), int'($urandom_range(0, 2047)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
