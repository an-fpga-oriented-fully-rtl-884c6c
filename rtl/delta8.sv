// delta8: the block-diagonal transform Delta8 = H4 (+) H4.
//
// An 8-vector is split into its real half (elements 0..3) and its dual half
// (elements 4..7). Each half is multiplied by the Hadamard matrix H4 on its
// own, so the block uses 16 additions. The algorithm uses Delta8 three
// times: on Q1 before the multipliers, on Q2 when the coefficients are
// formed, and in the adder network after the multipliers.
//
// Interface: a[8] is the IW-bit signed input, y[8] the (IW+2)-bit result.
// y[0..3] = H4 a[0..3] and y[4..7] = H4 a[4..7]. Purely combinational.
module delta8 #(
  parameter int unsigned IW = 16
) (
  input  logic signed [IW-1:0] a [8],
  output logic signed [IW+1:0] y [8]
);

  logic signed [IW-1:0] a_lo [4], a_hi [4];
  logic signed [IW+1:0] y_lo [4], y_hi [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      a_lo[i] = a[i];
      a_hi[i] = a[i+4];
      y[i]    = y_lo[i];
      y[i+4]  = y_hi[i];
    end
  end

  hadamard4 #(.IW(IW)) u_h_lo (.a(a_lo), .y(y_lo));
  hadamard4 #(.IW(IW)) u_h_hi (.a(a_hi), .y(y_hi));

endmodule
