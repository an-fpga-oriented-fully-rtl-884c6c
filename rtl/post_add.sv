// post_add: the adder network after the multipliers. It turns the 24
// lane products m0..m23 into the eight components y0..y7 of Q1*Q2.
//
// Real part (y0..y3), from lanes 0..7:
//   t_top = H4 (m4..m7)                         Hadamard lanes, /4 scaled
//   c_top = (m0, m3, m1, m2)                    correction products
//   y_top = D4 (t_top - c_top)
// Dual part (y4..y7), from lanes 8..23:
//   t_bot = H4 (m8..m11 + m12..m15)
//   c_bot = (m16..m19 + m20..m23), reordered the same way
//   y_bot = D4 (t_bot - c_bot)
// Here D4 = diag(-1, 1, 1, 1): the sign change of y0 and y4 is the
// published algorithm's D8. It costs nothing here, because row 0 simply
// subtracts in the opposite order. The two H4 blocks are the Delta8 of the
// output side. The pairwise sums of lanes 8..15 and 16..23 are the
// published summation matrices. The published data-flow diagrams draw
// every junction as a sum and put a factor of +2 on the correction lanes.
// With that sign and D8 as given, the product is right only if the
// correction terms are subtracted. This design subtracts them, which costs
// the same adders.
//
// Alignment: Hadamard lanes carry FRAC = 2 fractional bits. Correction
// lanes are integers and are shifted left by FRAC before they are
// combined. The H4 sums are always multiples of 4 in that format, so the
// final shift right by FRAC drops only zero bits and the result is exact.
//
// Interface: m[24] is (2W+4)-bit signed, y[8] is (2W+3)-bit signed. That
// width holds every exact product of two W-bit dual quaternions.
// Purely combinational.
module post_add
  import dq_pkg::*;
#(
  parameter int unsigned W = DQ_W
) (
  input  logic signed [2*W+3:0] m [N_LANES],
  output logic signed [2*W+2:0] y [8]
);

  localparam int unsigned PW  = 2 * W + 4;   // product width
  localparam int unsigned AW  = PW + 6;      // accumulation width
  localparam int unsigned YW  = 2 * W + 3;   // result width

  logic signed [PW-1:0] m_top [4];           // lanes 4..7
  logic signed [PW:0]   u_bot [4];           // lanes 8..11 + 12..15
  logic signed [PW+1:0] t_top [4];
  logic signed [PW+2:0] t_bot [4];
  logic signed [AW-1:0] c_top, c_bot, d_top, d_bot;

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      m_top[j] = m[4 + j];
      u_bot[j] = m[8 + j] + m[12 + j];
    end
  end

  hadamard4 #(.IW(PW))     u_h_top (.a(m_top), .y(t_top));
  hadamard4 #(.IW(PW + 1)) u_h_bot (.a(u_bot), .y(t_bot));

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      c_top = AW'(m[PI[i]]) <<< FRAC;
      c_bot = (AW'(m[16 + PI[i]]) + AW'(m[20 + PI[i]])) <<< FRAC;
      // D4 folded into the subtractors: row 0 subtracts the other way
      if (i == 0) begin
        d_top = c_top - AW'(t_top[i]);
        d_bot = c_bot - AW'(t_bot[i]);
      end else begin
        d_top = AW'(t_top[i]) - c_top;
        d_bot = AW'(t_bot[i]) - c_bot;
      end
      y[i]     = YW'(d_top >>> FRAC);
      y[4 + i] = YW'(d_bot >>> FRAC);
    end
  end

endmodule
