// coef_gen: forms the 24 multiplier coefficients s0..s23 from Q2.
//
// The coefficients depend only on the right-hand operand
// Q2 = (b0..b7). If Q2 is constant they can be formed once. In this fully
// parallel datapath they are formed in the same pass as the Q1 operands.
//   s0..s3   = 2 * (b0, b3, b1, b2)          real-part correction
//   s4..s7   = (H4 * (b0..b3)) / 4
//   s8..s11  = (H4 * (b0..b3)) / 4           same values as s4..s7
//   s12..s15 = (H4 * (b4..b7)) / 4
//   s16..s19 = 2 * (b4, b7, b5, b6)          dual-part correction
//   s20..s23 = 2 * (b0, b3, b1, b2)          same values as s0..s3
// The Hadamard step is one Delta8 block (16 additions). The factors 2 and
// 1/4 and the grouping of s into 4 + 12 + 8 lanes follow the published algorithm's
// coefficient diagram. The order (b0, b3, b1, b2) inside a correction group
// is this design's choice; it pairs with the operand order of x_preadd and
// the output routing of post_add.
//
// Number format: every s word is SW = W+2 bits signed. The factor 2 is a
// one-bit left shift, so lanes 0..3 and 16..23 hold integers. The factor
// 1/4 is only a binary point: lanes 4..15 hold H4*b unchanged and are
// read with dq_pkg::FRAC = 2 fractional bits. Nothing is rounded.
//
// Interface: b[8] is W-bit signed, s[24] is (W+2)-bit signed.
// Purely combinational.
module coef_gen
  import dq_pkg::*;
#(
  parameter int unsigned W = DQ_W
) (
  input  logic signed [W-1:0] b [8],
  output logic signed [W+1:0] s [N_LANES]
);

  logic signed [W+1:0] bh [8];   // Delta8 * b: H4 b_top, H4 b_bot

  delta8 #(.IW(W)) u_delta (.a(b), .y(bh));

  always_comb begin
    for (int j = 0; j < 4; j++) begin
      s[j]      = (W+2)'(b[PI[j]])     <<< 1;   // 2 * b_top, permuted
      s[4 + j]  = bh[j];                        // H4 b_top, read as /4
      s[8 + j]  = bh[j];                        // H4 b_top, read as /4
      s[12 + j] = bh[4 + j];                    // H4 b_bot, read as /4
      s[16 + j] = (W+2)'(b[4 + PI[j]]) <<< 1;   // 2 * b_bot, permuted
      s[20 + j] = (W+2)'(b[PI[j]])     <<< 1;   // 2 * b_top, permuted
    end
  end

endmodule
