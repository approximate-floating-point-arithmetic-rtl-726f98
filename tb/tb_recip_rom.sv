// tb_recip_rom: reads every entry of the seed table and compares it with
// (1 + i/1024 + 2^-11)^-2 evaluated in real arithmetic (within one unit of
// the 20th fraction bit). Also checks that the read is registered.
`timescale 1ns/1ps
module tb_recip_rom;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [9:0]  addr;
  logic [19:0] data;
  int checks = 0, failures = 0;

  recip_rom dut (.clk(clk), .addr(addr), .data(data));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real c, got;
    logic [19:0] held;
    addr = '0;
    for (int i = 0; i < 1024; i++) begin
      addr = 10'(i);
      @(posedge clk); #1;
      c   = 1.0 / ((1.0 + i / 1024.0 + 1.0 / 2048.0) ** 2);
      got = real'(data) / 1048576.0;
      checks++;
      if (got - c > 1.0 / 1048576.0 || c - got > 1.0 / 1048576.0) begin
        failures++;
        $display("FAIL entry %0d: got %f expected %f", i, got, c);
      end
    end
    // changing the address must not change data before the next clock edge
    held = data;
    addr = 10'd0;
    #1;
    checks++;
    if (data != held) begin
      failures++;
      $display("FAIL read is not registered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
