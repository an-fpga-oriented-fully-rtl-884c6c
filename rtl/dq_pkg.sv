// dq_pkg: constants shared by the dual-quaternion multiplier.
//
// The multiplier computes Y = Q1*Q2 for dual quaternions held as 8-tuples
// (q0..q3 real part, q4..q7 dual part) with 24 real multiplications.
// The algorithm multiplies 24 lanes. Each lane multiplies a coefficient
// s_i, which depends only on Q2, by an operand v_i, which depends only
// on Q1. This package gives the lane count, the default word width and
// the one routing table that lanes need.
//
// Lane map (lane = index of s_i / v_i):
//   0..3   : s = 2*b_top[PI]   v = x_top          (real-part correction)
//   4..7   : s = H4 b_top / 4  v = H4 x_top       (real part, Hadamard lanes)
//   8..11  : s = H4 b_top / 4  v = H4 x_bot       (dual part, Hadamard lanes)
//   12..15 : s = H4 b_bot / 4  v = H4 x_top       (dual part, Hadamard lanes)
//   16..19 : s = 2*b_bot[PI]   v = x_top          (dual-part correction)
//   20..23 : s = 2*b_top[PI]   v = x_bot          (dual-part correction)
// The factors 2 and 1/4 come from the published algorithm's coefficient diagram. The
// permutation PI and the lane order are this design's own choice, checked
// against the direct product.
package dq_pkg;

  // Number of real multipliers in the fully parallel datapath.
  localparam int unsigned N_LANES = 24;

  // Default width of one real component of an input dual quaternion.
  localparam int unsigned DQ_W = 16;

  // Fractional bits of the Hadamard lanes (the factor 1/4 of lanes 4..15).
  localparam int unsigned FRAC = 2;

  // Correction lanes: lane j of a group of four multiplies x_j by
  // b_{PI[j]}. Output row i of the correction subtracts lane PI[i] of the
  // group. The same table serves both uses.
  localparam int unsigned PI [4] = '{0, 3, 1, 2};

  // True for lanes whose coefficient carries the factor 1/4, that is,
  // whose coefficient word has FRAC fractional bits.
  function automatic bit is_quarter_lane(int unsigned lane);
    return (lane >= 4) && (lane < 16);
  endfunction

endpackage
