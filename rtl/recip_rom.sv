// recip_rom: seed table of the Newton-Raphson divider.
//
// The divisor significand X = 1.x1 x2 ... is split after its M-th fraction
// bit. For the leading part X_m1 = 1.x1..xM the table holds
//   C = (X_m1 + 2^-(M+1))^-2,
// the constant of a first-order Taylor expansion of 1/X about the middle of
// the interval selected by x1..xM. Multiplying C by the operand-modified
// divisor X' (bits x(M+1)..x(2M) inverted) gives a seed reciprocal good to
// about 2M bits. The formula, M = 10 and the 2^10 x 20-bit size follow the
// document. Entries are unsigned fractions with DW bits after the binary
// point (C lies in (1/4, 1)), rounded to nearest; they are computed at
// elaboration from the formula: with i = x1..xM read as an integer,
//   C * 2^DW = 2^(DW + 2M + 2) / (2^(M+1) + 2i + 1)^2.
// One-cycle synchronous read: data holds the entry for the address sampled
// at the last rising clock edge.
module recip_rom #(
  parameter int unsigned M  = 10,
  parameter int unsigned DW = 20
) (
  input  logic          clk,
  input  logic [M-1:0]  addr,
  output logic [DW-1:0] data
);
  typedef logic [DW-1:0] table_t [2**M];

  function automatic table_t build_table();
    table_t t;
    longint unsigned num, den;
    num = 64'd1 << (DW + 2*M + 2);
    for (int i = 0; i < 2**M; i++) begin
      den  = longint'((2**(M+1)) + 2*i + 1);
      den  = den * den;
      t[i] = DW'((num + den / 2) / den);
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_ff @(posedge clk) data <= TABLE[addr];
endmodule
