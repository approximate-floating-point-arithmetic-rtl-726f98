// tb_nr_divider: checks the Newton-Raphson significand divider.
//
// For random significands the quotient register is compared with (1.n)/(1.d)
// computed in real arithmetic; the error must stay within a few units of
// 2^-53 (at most eight) for the exact (TRUNC_H = 0) and the default
// truncated instance. The
// number of cycles from the start edge to done must be seven.
`timescale 1ns/1ps
module tb_nr_divider;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, start;
  logic [51:0]  d, n;
  logic         busy0, done0, busy1, done1;
  logic [107:0] q0, q1;
  int checks = 0, failures = 0;
  real max_err0 = 0.0, max_err1 = 0.0;

  nr_divider #(.TRUNC_H(0)) dut_exact (.clk(clk), .rst_n(rst_n), .start(start), .d_frac(d),
                                       .n_frac(n), .busy(busy0), .done(done0), .q(q0));
  nr_divider dut_trunc (.clk(clk), .rst_n(rst_n), .start(start), .d_frac(d), .n_frac(n),
                        .busy(busy1), .done(done1), .q(q1));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real qval(input logic [107:0] qq);
    return real'(qq[107:44]) / (2.0 ** 63);
  endfunction

  task automatic run(input logic [51:0] dd, input logic [51:0] nn);
    int cycles;
    real expq, e0, e1;
    @(negedge clk);
    d = dd; n = nn; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!done1) begin
      @(negedge clk);
      cycles++;
      if (cycles > 20) break;
    end
    checks++;
    if (cycles != 7 || !done0) begin
      failures++;
      $display("FAIL latency %0d cycles", cycles);
    end
    expq = (1.0 + real'(nn) / (2.0 ** 52)) / (1.0 + real'(dd) / (2.0 ** 52));
    e0 = (qval(q0) - expq) * (2.0 ** 53);
    e1 = (qval(q1) - expq) * (2.0 ** 53);
    if (e0 < 0) e0 = -e0;
    if (e1 < 0) e1 = -e1;
    if (e0 > max_err0) max_err0 = e0;
    if (e1 > max_err1) max_err1 = e1;
    checks += 2;
    if (e0 > 8.0) begin failures++; $display("FAIL exact d=%h n=%h err=%f", dd, nn, e0); end
    if (e1 > 8.0) begin failures++; $display("FAIL trunc d=%h n=%h err=%f", dd, nn, e1); end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; d = '0; n = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run('0, '0);
    run('1, '0);
    run('0, '1);
    run('1, '1);
    for (int i = 0; i < 1500; i++) run({20'($urandom), $urandom}, {20'($urandom), $urandom});
    $display("max error (units of 2^-53): exact %f, truncated %f", max_err0, max_err1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
