// nr_divider: Newton-Raphson significand divider on one shared multiplier.
//
// Computes N/D for significands N = 1.n, D = 1.d in [1,2) by first forming
// the reciprocal of D with two Newton-Raphson steps x' = x (2 - D x) and then
// multiplying by N. One 54 x 54 array multiplier (optionally truncated by
// TRUNC_H columns) is time-shared under a fixed seven-cycle schedule, as in
// the document's division unit:
//   cycle 1  ROM lookup of C with D[51:42]; operand modifier forms X'
//   cycle 2  MUX1 = C,  MUX2 = X'        -> R3, R4   (seed x0 = C * X')
//   cycle 3  MUX1 = D,  MUX2 = R3        -> R4       (D x)
//   cycle 4  MUX1 = R3, MUX2 = INV(R4)   -> R3       (x (2 - D x))
//   cycle 5  MUX1 = D,  MUX2 = R3        -> R4
//   cycle 6  MUX1 = R3, MUX2 = INV(R4)   -> R3       (reciprocal of D)
//   cycle 7  MUX1 = R3, MUX2 = N         -> R5       (quotient)
// INV is a plain bitwise inversion, i.e. one's complement 2 - v - 2^-53,
// as the document describes.
//
// Number format (this design's choice): every multiplier operand is an
// unsigned 54-bit fixed-point number with one integer bit (value = int/2^53);
// the product's bits [106:53] are written back to R3/R4, the document's "54
// most significant bits" of a product whose top bit is always zero here. C is
// placed as {0, C[19:0], 33 zeros} and X' as {1, D[51:42], ~D[41:32],
// 33 zeros}. q (= R5) is the whole quotient product shifted left by one:
// bit 107 has weight 1, so q is in (1/2, 2) with 107 fraction bits, and
// q[0] is always zero.
//
// Interface: pulse start for one cycle while busy is low; D and N are sampled
// with start. done pulses seven cycles after the start edge and q then holds
// until the next quotient is written.
module nr_divider #(
  parameter int unsigned TRUNC_H = 48,
  parameter int unsigned M       = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [51:0]   d_frac,
  input  logic [51:0]   n_frac,
  output logic          busy,
  output logic          done,
  output logic [107:0]  q
);
  typedef enum logic [2:0] {
    ST_IDLE, ST_ROM, ST_SEED, ST_NR1_DX, ST_NR1_UPD, ST_NR2_DX, ST_NR2_UPD, ST_QUOT
  } state_e;

  typedef enum logic [1:0] {S1_ROM, S1_D, S1_R3} sel1_e;
  typedef enum logic [1:0] {S2_XMOD, S2_N, S2_R3, S2_INV_R4} sel2_e;

  state_e       state;
  sel1_e        s1;
  sel2_e        s2;
  logic [51:0]  d_q, n_q;
  logic [19:0]  rom_q;
  logic [53:0]  xmod_q, r3, r4, mux1, mux2;
  logic [107:0] prod;

  // ---------------- ROM and operand modifier ----------------
  recip_rom #(.M(M), .DW(2*M)) u_rom (.clk(clk), .addr(d_q[51 -: M]), .data(rom_q));

  always_ff @(posedge clk) begin
    xmod_q <= {1'b1, d_q[51 -: M], ~d_q[51-M -: M], {(53-2*M){1'b0}}};
  end

  // ---------------- operand multiplexers ----------------
  always_comb begin
    unique case (state)
      ST_SEED:                s1 = S1_ROM;
      ST_NR1_DX, ST_NR2_DX:   s1 = S1_D;
      default:                s1 = S1_R3;
    endcase
    unique case (state)
      ST_SEED:                s2 = S2_XMOD;
      ST_NR1_DX, ST_NR2_DX:   s2 = S2_R3;
      ST_NR1_UPD, ST_NR2_UPD: s2 = S2_INV_R4;
      default:                s2 = S2_N;
    endcase
  end

  always_comb begin
    unique case (s1)
      S1_ROM:  mux1 = {1'b0, rom_q, 33'd0};
      S1_D:    mux1 = {1'b1, d_q, 1'b0};
      default: mux1 = r3;
    endcase
    unique case (s2)
      S2_XMOD: mux2 = xmod_q;
      S2_N:    mux2 = {1'b1, n_q, 1'b0};
      S2_R3:   mux2 = r3;
      default: mux2 = ~r4;
    endcase
  end

  array_multiplier #(.N(54), .H(TRUNC_H)) u_mul (.x(mux1), .y(mux2), .p(prod));

  // ---------------- controller and registers R3, R4, R5 ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      done  <= 1'b0;
      d_q   <= '0;
      n_q   <= '0;
      r3    <= '0;
      r4    <= '0;
      q     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) begin
          d_q   <= d_frac;
          n_q   <= n_frac;
          state <= ST_ROM;
        end
        ST_ROM:     state <= ST_SEED;
        ST_SEED:    begin r3 <= prod[106:53]; r4 <= prod[106:53]; state <= ST_NR1_DX;  end
        ST_NR1_DX:  begin r4 <= prod[106:53];                     state <= ST_NR1_UPD; end
        ST_NR1_UPD: begin r3 <= prod[106:53];                     state <= ST_NR2_DX;  end
        ST_NR2_DX:  begin r4 <= prod[106:53];                     state <= ST_NR2_UPD; end
        ST_NR2_UPD: begin r3 <= prod[106:53];                     state <= ST_QUOT;    end
        ST_QUOT:    begin q  <= {prod[106:0], 1'b0}; done <= 1'b1; state <= ST_IDLE; end
        default:    state <= ST_IDLE;
      endcase
    end
  end

  assign busy = (state != ST_IDLE);

  // A new division may only start while the unit is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("nr_divider: start while busy");
endmodule
