// mult_bank: the 24 real multipliers of the algorithm (the diagonal
// matrix D24 = diag(s0..s23) applied to the operand vector).
//
// Lane i forms m_i = s_i * v_i as a full-width signed product. Both factors
// are W+2 bits, so at the default W = 16 each lane maps onto one 18x18
// embedded multiplier. These 24 products are the only real
// multiplications in the datapath. The binary point of m_i is that of s_i
// (see coef_gen). This block does not realign it.
//
// Interface: s[24] and v[24] are (W+2)-bit signed, m[24] is (2W+4)-bit
// signed. Purely combinational. The top registers the products.
module mult_bank
  import dq_pkg::*;
#(
  parameter int unsigned W = DQ_W
) (
  input  logic signed [W+1:0]   s [N_LANES],
  input  logic signed [W+1:0]   v [N_LANES],
  output logic signed [2*W+3:0] m [N_LANES]
);

  for (genvar i = 0; i < N_LANES; i++) begin : g_lane
    assign m[i] = s[i] * v[i];
  end

endmodule
