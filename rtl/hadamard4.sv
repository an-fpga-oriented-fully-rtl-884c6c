// hadamard4: multiplies a 4-vector by the order-4 Hadamard matrix H4.
//
// H4 is the Sylvester Hadamard matrix. Its entry (i,k) is
// (-1)^popcount(i & k):
//     [ 1  1  1  1 ]
//     [ 1 -1  1 -1 ]
//     [ 1  1 -1 -1 ]
//     [ 1 -1 -1  1 ]
// The product is formed by two butterfly stages with four adders or
// subtractors each, so eight additions in all. The published algorithm states this
// count of eight. The published algorithm names a "Hadamard matrix of order 4" but not
// its sign pattern. The Sylvester form is this design's choice: it is the
// one for which H4 diag(H4 b) H4 / 4 gives the matrix with entries
// b_(i xor j) that the algorithm relies on.
//
// Interface: a[4] is the input vector, IW-bit signed. y[4] is the output,
// IW+2 bits wide, so it cannot overflow. Purely combinational.
module hadamard4 #(
  parameter int unsigned IW = 16
) (
  input  logic signed [IW-1:0] a [4],
  output logic signed [IW+1:0] y [4]
);

  logic signed [IW:0] p [4];

  always_comb begin
    // first stage: pairs at distance 1
    p[0] = a[0] + a[1];
    p[1] = a[0] - a[1];
    p[2] = a[2] + a[3];
    p[3] = a[2] - a[3];
    // second stage: pairs at distance 2
    y[0] = p[0] + p[2];
    y[1] = p[1] + p[3];
    y[2] = p[0] - p[2];
    y[3] = p[1] - p[3];
  end

endmodule
