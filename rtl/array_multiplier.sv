// array_multiplier: unsigned N x N carry-save array multiplier, optionally
// truncated.
//
// Partial-product bits x[i] & y[j] (weight i+j) are added row by row: row r
// is a line of full adders that adds partial-product row r to the sum and
// carry vectors left by row r-1, every carry moving one column to the left.
// A final carry-propagate adder merges the last sum and carry vectors into
// the 2N-bit product. This is the array structure the document uses for the
// fraction multiplier; each row of full adders is written as one bit-vector
// expression (sum = a^b^c, carry = majority(a,b,c)) rather than as separate
// cell instances.
//
// Truncation: with H > 0 the H least significant columns (the LSP-minor part
// of the partial-product matrix) hold no partial products, so no adder cell
// there ever sees a one and none needs to be built; the carries they would
// send up are lost. The product is sum(x[i] y[j] 2^(i+j), i+j >= H) and its
// H low bits are zero. This is the document's truncated multiplier, with no
// correction term; H = 0 gives the full-precision multiplier.
// Combinational.
module array_multiplier #(
  parameter int unsigned N = 53,
  parameter int unsigned H = 0      // truncated columns, 0 <= H <= N-1
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  localparam int unsigned PW = 2 * N;
  localparam logic [PW-1:0] KEEP = {PW{1'b1}} << H;   // columns that exist

  // s[r] / c[r]: sum and carry vectors after row r (c[r][k] enters column k).
  logic [PW-1:0] s  [N];
  logic [PW-1:0] c  [N];
  logic [PW-1:0] pp [N];

  for (genvar r = 0; r < N; r++) begin : g_pp
    assign pp[r] = ({{N{1'b0}}, x & {N{y[r]}}} << r) & KEEP;
  end

  assign s[0] = pp[0];
  assign c[0] = '0;

  // One row of full adders per partial-product row.
  for (genvar r = 1; r < N; r++) begin : g_row
    assign s[r] = s[r-1] ^ c[r-1] ^ pp[r];
    assign c[r] = ((s[r-1] & c[r-1]) | (s[r-1] & pp[r]) | (c[r-1] & pp[r])) << 1;
  end

  // Final carry-propagate row.
  assign p = s[N-1] + c[N-1];
endmodule
