// barrel_shifter_r8: two-level radix-8 barrel shifter.
//
// The first level shifts by 0..7 positions (amt[2:0]); the second level
// shifts by multiples of eight (amt[CTRL_BITS-1:3]). Splitting the shift this
// way keeps every input bit's fan-out at eight in the first level and at most
// 2^(CTRL_BITS-3) in the second, instead of WIDTH in a one-level array. The
// structure is the one the document describes. The number of control bits is
// a parameter because the document studies shifters with fewer control bits
// as an approximation: with CTRL_BITS = n the largest shift is 2^n - 1 and
// the caller must saturate larger amounts. Vacated positions are filled with
// `fill` (the R-path of the adder shifts one's-complemented operands, which
// need ones shifted in). LEFT selects the direction. Combinational.
module barrel_shifter_r8 #(
  parameter int unsigned WIDTH     = 118,
  parameter int unsigned CTRL_BITS = 6,
  parameter bit          LEFT      = 1'b0
) (
  input  logic [WIDTH-1:0]     din,
  input  logic [CTRL_BITS-1:0] amt,
  input  logic                 fill,
  output logic [WIDTH-1:0]     dout
);
  localparam int unsigned L1_BITS = (CTRL_BITS < 3) ? CTRL_BITS : 3;
  localparam int unsigned L2_BITS = CTRL_BITS - L1_BITS;

  logic [WIDTH-1:0] lvl1;

  // First level: 0..7 (or fewer when CTRL_BITS < 3) positions.
  always_comb begin
    lvl1 = din;
    for (int s = 1; s < (1 << L1_BITS); s++) begin
      if (amt[L1_BITS-1:0] == L1_BITS'(s)) begin
        for (int i = 0; i < WIDTH; i++) begin
          if (LEFT) lvl1[i] = (i >= s) ? din[i-s] : fill;
          else      lvl1[i] = (i + s < WIDTH) ? din[i+s] : fill;
        end
      end
    end
  end

  // Second level: multiples of eight positions.
  if (L2_BITS > 0) begin : g_lvl2
    always_comb begin
      dout = lvl1;
      for (int s = 1; s < (1 << L2_BITS); s++) begin
        if (amt[CTRL_BITS-1:L1_BITS] == L2_BITS'(s)) begin
          for (int i = 0; i < WIDTH; i++) begin
            if (LEFT) dout[i] = (i >= 8*s) ? lvl1[i-8*s] : fill;
            else      dout[i] = (i + 8*s < WIDTH) ? lvl1[i+8*s] : fill;
          end
        end
      end
    end
  end else begin : g_no_lvl2
    assign dout = lvl1;
  end
endmodule
