// Carry estimate for the truncated least-significant part (LP) of the array.
//
// The fixed-width multiplier never adds the partial-product bits of the
// columns below n-1. Of these, the column n-2 (the "LPmajor" column) has the
// largest weight; it holds one bit of each Booth row plus the neg bit of the
// last row. This block counts the ones in that column (sigma) and returns the
// number to add at column n-1 in place of the missing carries:
//   comp = floor((sigma + OFFSET) / 2),  OFFSET = n/4 + 1
// sigma/2 is the carry of the LPmajor column itself; OFFSET stands for the
// average carry from the remaining, lower columns ("LPminor") plus the
// rounding one at column n-1 of a post-truncated product. The constant was
// chosen here so that the mean error of the product stays near zero for
// n = 8, 12 and 16; the exact compensation rule is this design's own.
// Purely combinational.
module lpmajor_comp #(
  parameter int unsigned NB     = 7,   // bits in the LPmajor column (n/2 + 1)
  parameter int unsigned OFFSET = 4,   // n/4 + 1
  parameter int unsigned CW     = 3    // width of comp, enough for the largest value
) (
  input  logic [NB-1:0] lp_major,
  output logic [CW-1:0] comp
);

  localparam int unsigned SW = CW + 1;  // width of sigma + OFFSET

  logic [SW-1:0] sigma;

  always_comb begin
    sigma = SW'(OFFSET);
    for (int b = 0; b < int'(NB); b++) sigma = sigma + SW'(lp_major[b]);
    comp = CW'(sigma >> 1);
  end

endmodule
