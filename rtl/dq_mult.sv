// dq_mult: fully parallel multiplier of two dual quaternions,
// Y = Q1 * Q2, using 24 real multiplications instead of 64.
//
// Operands are 8-tuples: Q1 = x0 + i x1 + j x2 + k x3 + e (x4 + i x5 + j x6
// + k x7), where i,j,k are the quaternion units and e*e = 0. Q2 (b0..b7)
// and Y (y0..y7) have the same layout. The product is the matrix-vector
// product Y = B8 X. B8 is built from two 4x4 quaternion matrices of Q2 and
// has a zero upper-right block. That matrix is factored as
//   Y = D8 * Sum * Delta8 * Sum * diag(s) * Perm * Delta8 * Perm * X,
// and the diagonal s = s0..s23 is computed from Q2 alone. Data flows
// through four blocks:
//   x_preadd  : Delta8 on Q1 and fan-out to 24 operands   (16 additions)
//   coef_gen  : Delta8 on Q2 and the 2x / (1/4)x scaling   (16 additions)
//   mult_bank : 24 parallel multipliers
//   post_add  : sums, Delta8 and sign change               (32 additions)
// That makes 24 multiplications and 64 additions per product.
//
// Pipeline (this design's choice; the published algorithm gives no registers):
//   stage 1 registers the operands v and coefficients s,
//   stage 2 registers the 24 products,
//   stage 3 registers the result.
// A product is accepted every clock cycle. out_valid and y follow in_valid,
// x and b exactly LATENCY = 3 cycles later. There is no back-pressure.
// rst_n is synchronous and active low. It clears only the valid bits. The
// data registers are loaded on every valid input and are not reset.
//
// Widths: x and b are W-bit signed integers, W = 16 by default (the
// document gives no word length). y is 2W+3 bits, enough for the exact
// product. Multiplier factors are W+2 = 18 bits.
module dq_mult
  import dq_pkg::*;
#(
  parameter int unsigned W = DQ_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [W-1:0]   x [8],       // Q1, left operand
  input  logic signed [W-1:0]   b [8],       // Q2, right operand
  output logic                  out_valid,
  output logic signed [2*W+2:0] y [8]        // Q1 * Q2
);

  localparam int unsigned LATENCY = 3;

  logic signed [W+1:0]   v_c [N_LANES], s_c [N_LANES];
  logic signed [W+1:0]   v_q [N_LANES], s_q [N_LANES];
  logic signed [2*W+3:0] m_c [N_LANES], m_q [N_LANES];
  logic signed [2*W+2:0] y_c [8];
  logic [LATENCY-1:0]    vld;

  x_preadd  #(.W(W)) u_pre  (.x(x), .v(v_c));
  coef_gen  #(.W(W)) u_coef (.b(b), .s(s_c));
  mult_bank #(.W(W)) u_mul  (.s(s_q), .v(v_q), .m(m_c));
  post_add  #(.W(W)) u_post (.m(m_q), .y(y_c));

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      v_q <= v_c;
      s_q <= s_c;
    end
    if (vld[0]) m_q <= m_c;
    if (vld[1]) y   <= y_c;
  end

  assign out_valid = vld[LATENCY-1];

endmodule
