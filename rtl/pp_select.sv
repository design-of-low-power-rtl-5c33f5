// Partial-product selector cell ("S" cell) for one bit of a Booth row.
//
// s = ((x[j] & one) | (x[j-1] & two)) ^ neg
// The cell picks bit j of +X (one), of 2X (two, i.e. x[j-1]) or neither
// (digit 0), and inverts it for a negative digit. Together with the neg bit
// added at the row's lowest column this forms the two's complement of the
// selected multiple. The AND-AND-OR-XOR structure follows the published
// partial-product generator drawing. Purely combinational.
module pp_select
  import fwb_pkg::*;
(
  input  logic        x_j,    // multiplicand bit j
  input  logic        x_jm1,  // multiplicand bit j-1 (0 for j = 0)
  input  booth_ctrl_t ctrl,
  output logic        s
);

  always_comb s = ((x_j & ctrl.one) | (x_jm1 & ctrl.two)) ^ ctrl.neg;

endmodule
