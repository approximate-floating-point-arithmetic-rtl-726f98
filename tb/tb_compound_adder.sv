// tb_compound_adder: compares sum and sum + 1 of the compound adder with
// integer addition for 57-bit and 12-bit instances, random and corner values.
`timescale 1ns/1ps
module tb_compound_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [56:0] a, b;
  logic [57:0] s, sp1;
  logic [11:0] a12, b12;
  logic [12:0] s12, sp12;
  int checks = 0, failures = 0;

  compound_adder dut (.a(a), .b(b), .sum(s), .sum_p1(sp1));
  compound_adder #(.W(12)) dut12 (.a(a12), .b(b12), .sum(s12), .sum_p1(sp12));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [56:0] x, input logic [56:0] y);
    a = x; b = y; a12 = x[11:0]; b12 = y[11:0];
    @(posedge clk); #1;
    checks += 4;
    if (s   !== {1'b0, x} + {1'b0, y})         begin failures++; $display("FAIL sum %h %h", x, y); end
    if (sp1 !== {1'b0, x} + {1'b0, y} + 58'd1) begin failures++; $display("FAIL sum+1 %h %h", x, y); end
    if (s12  !== {1'b0, x[11:0]} + {1'b0, y[11:0]})         begin failures++; $display("FAIL sum12"); end
    if (sp12 !== {1'b0, x[11:0]} + {1'b0, y[11:0]} + 13'd1) begin failures++; $display("FAIL sum12+1"); end
  endtask

  initial begin
    a = '0; b = '0; a12 = '0; b12 = '0;
    @(posedge clk);
    check('0, '0); check('1, '0); check('1, '1); check('1, 57'd1); check(57'h0AAAAAAAAAAAAAA, 57'h155555555555555);
    for (int i = 0; i < 5000; i++) check({25'($urandom), $urandom}, {25'($urandom), $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
