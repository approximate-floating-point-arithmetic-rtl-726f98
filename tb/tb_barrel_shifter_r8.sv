// tb_barrel_shifter_r8: compares the radix-8 barrel shifter with shift
// operators: a 118-bit right shifter with 6 control bits and fill, a 53-bit
// left shifter, and a 54-bit right shifter with 3 control bits, over every
// shift amount and random data.
`timescale 1ns/1ps
module tb_barrel_shifter_r8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [117:0] d118, r118;
  logic [52:0]  d53, l53;
  logic [53:0]  d54, r54;
  logic [5:0]   amt;
  logic [2:0]   amt3;
  logic         fill;
  int checks = 0, failures = 0;

  barrel_shifter_r8 dut_r (.din(d118), .amt(amt), .fill(fill), .dout(r118));
  barrel_shifter_r8 #(.WIDTH(53), .LEFT(1'b1)) dut_l (.din(d53), .amt(amt), .fill(1'b0), .dout(l53));
  barrel_shifter_r8 #(.WIDTH(54), .CTRL_BITS(3)) dut_3 (.din(d54), .amt(amt3), .fill(fill), .dout(r54));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [235:0] wide;
    d118 = '0; d53 = '0; d54 = '0; amt = '0; amt3 = '0; fill = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      d118 = {22'($urandom), $urandom, $urandom, $urandom};
      d53  = {21'($urandom), $urandom};
      d54  = {22'($urandom), $urandom};
      amt  = 6'(i % 64);
      amt3 = 3'(i % 8);
      fill = 1'(i / 64);
      @(posedge clk); #1;
      wide = {{118{fill}}, d118} >> amt;
      checks += 3;
      if (r118 !== wide[117:0]) begin failures++; $display("FAIL right118 amt=%0d", amt); end
      if (l53 !== (amt < 53 ? d53 << amt : 53'd0)) begin failures++; $display("FAIL left53 amt=%0d", amt); end
      wide = {{182{fill}}, d54} >> amt3;
      if (r54 !== wide[53:0]) begin failures++; $display("FAIL right54 amt=%0d", amt3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
