// x_preadd: forms the 24 multiplier operands v0..v23 from Q1.
//
// The left-hand operand Q1 = (x0..x7) is passed through one Delta8 block
// (H4 on x0..x3 and on x4..x7, 16 additions). The operands are then
// spread over the 24 multiplier lanes:
//   v0..v3   = x0..x3           v12..v15 = H4 (x0..x3)
//   v4..v7   = H4 (x0..x3)      v16..v19 = x0..x3
//   v8..v11  = H4 (x4..x7)      v20..v23 = x4..x7
// This is the front half of the published factorisation: one copy of x,
// the Delta8 transform of x, and a duplicating permutation to 24 lanes.
// Which Hadamard half goes to lanes 8..11 and which to 12..15 is this
// design's choice. It was made so that each lane meets the coefficient of
// coef_gen it must be multiplied by, and checked against the direct product.
//
// Interface: x[8] is W-bit signed, v[24] is (W+2)-bit signed (plain copies
// of x are sign-extended). Purely combinational.
module x_preadd
  import dq_pkg::*;
#(
  parameter int unsigned W = DQ_W
) (
  input  logic signed [W-1:0] x [8],
  output logic signed [W+1:0] v [N_LANES]
);

  logic signed [W+1:0] xh [8];   // Delta8 * x: H4 x_top, H4 x_bot

  delta8 #(.IW(W)) u_delta (.a(x), .y(xh));

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      v[j]      = (W+2)'(x[j]);
      v[4 + j]  = xh[j];
      v[8 + j]  = xh[4 + j];
      v[12 + j] = xh[j];
      v[16 + j] = (W+2)'(x[j]);
      v[20 + j] = (W+2)'(x[4 + j]);
    end
  end

endmodule
