// tb_array_multiplier: checks the carry-save array multiplier.
//
// A full 53 x 53 instance must equal the exact product; a truncated 53 x 53
// instance (H = 46) must equal the sum of exactly those partial-product bits
// whose weight is at least 2^46, computed here bit by bit; a 4 x 4 instance
// with three truncated columns (the small example of the truncated array) is
// checked exhaustively the same way.
`timescale 1ns/1ps
module tb_array_multiplier;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [52:0]  x, y;
  logic [105:0] p_full, p_trunc;
  logic [3:0]   x4, y4;
  logic [7:0]   p4;
  int checks = 0, failures = 0;

  array_multiplier dut_full (.x(x), .y(y), .p(p_full));
  array_multiplier #(.N(53), .H(46)) dut_trunc (.x(x), .y(y), .p(p_trunc));
  array_multiplier #(.N(4), .H(3)) dut4 (.x(x4), .y(y4), .p(p4));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] kept_sum(input logic [52:0] u, input logic [52:0] v,
                                            input int n, input int h);
    logic [127:0] acc = '0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        if (i + j >= h && u[i] && v[j]) acc += (128'd1 << (i + j));
    return acc;
  endfunction

  task automatic check(input logic [52:0] u, input logic [52:0] v);
    logic [127:0] exact;
    x = u; y = v;
    @(posedge clk); #1;
    exact = {75'd0, u} * {75'd0, v};
    checks++;
    if (p_full !== exact[105:0]) begin
      failures++;
      $display("FAIL full %h * %h = %h, got %h", u, v, exact[105:0], p_full);
    end
    checks++;
    if (p_trunc !== kept_sum(u, v, 53, 46)[105:0]) begin
      failures++;
      $display("FAIL trunc %h * %h got %h", u, v, p_trunc);
    end
  endtask

  initial begin
    x = '0; y = '0; x4 = '0; y4 = '0;
    @(posedge clk);
    check('1, '1);
    check(53'h10_0000_0000_0000, 53'h10_0000_0000_0000);
    check('0, '1);
    for (int i = 0; i < 3000; i++)
      check({21'($urandom), $urandom}, {21'($urandom), $urandom});
    for (int i = 0; i < 256; i++) begin
      x4 = 4'(i); y4 = 4'(i >> 4);
      @(posedge clk); #1;
      checks++;
      if (p4 !== kept_sum(53'(x4), 53'(y4), 4, 3)[7:0]) begin
        failures++;
        $display("FAIL 4x4 h=3 %0d * %0d got %0d", x4, y4, p4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
