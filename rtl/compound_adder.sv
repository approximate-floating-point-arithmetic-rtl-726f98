// compound_adder: parallel-prefix adder that delivers both A+B and A+B+1.
//
// A Kogge-Stone prefix tree computes, for every bit position i, the carry
// generated by bits [i-1:0] (gen_c[i]) and whether all of bits [i-1:0]
// propagate (prop_c[i]). The sum is a^b^gen_c and the incremented sum is
// a^b^(gen_c|prop_c), so the +1 costs only one OR per bit and a selection
// between the two results can be made late (rounding, lazy one's-complement
// subtraction). The sum/incremented-sum equations follow the document; the
// Kogge-Stone tree is this design's choice of prefix network.
// Purely combinational; sum and sum_p1 carry one extra bit for the carry out.
module compound_adder #(
  parameter int unsigned W = 57
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W:0]   sum,     // a + b
  output logic [W:0]   sum_p1   // a + b + 1
);
  localparam int unsigned LEVELS = $clog2(W) + 1;

  logic [W-1:0] g [LEVELS+1];
  logic [W-1:0] p [LEVELS+1];
  logic [W:0]   gen_c, prop_c;
  logic [W-1:0] hsum;

  assign hsum = a ^ b;
  assign g[0] = a & b;
  assign p[0] = a ^ b;

  // Kogge-Stone prefix: after level l, (g,p)[i] covers bits [i : i-2^l+1].
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= (1 << l)) begin : g_comb
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-(1<<l)]);
        assign p[l+1][i] = p[l][i] & p[l][i-(1<<l)];
      end else begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  // Carry into position i comes from the group [i-1:0].
  assign gen_c  = {g[LEVELS], 1'b0};
  assign prop_c = {p[LEVELS], 1'b1};

  assign sum    = {gen_c[W], hsum ^ gen_c[W-1:0]};
  assign sum_p1 = {gen_c[W] | prop_c[W], hsum ^ (gen_c[W-1:0] | prop_c[W-1:0])};
endmodule
