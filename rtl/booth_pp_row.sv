// One radix-4 Booth partial-product row: N+1 selector cells.
//
// Given the N-bit two's complement multiplicand x and the row's control word,
// it returns the N+1 bits of z*X (bits 0..N, bit N being the row's sign) in
// one's complement form, plus the neg bit that completes the two's
// complement. For sign extension the row's sign bit is returned inverted
// (q[N] = ~sign); the constant ones that this inversion requires are added by
// the multiplier around it. Cell j reads x[j] and x[j-1]; x[-1] = 0 and
// x[N] = x[N-1] (the sign-extended multiplicand needed by 2X). The inverted
// top cell matches the partial-product array drawing, where the leftmost bit
// of each row is a negated sign. The neg output is the control word's neg
// bit passed on unchanged. Purely combinational.
module booth_pp_row
  import fwb_pkg::*;
#(
  parameter int unsigned N = 12  // operand width
) (
  input  logic [N-1:0] x,     // multiplicand, two's complement
  input  booth_ctrl_t  ctrl,  // from this row's Booth encoder
  output logic [N:0]   q,     // row bits; q[N] is the inverted sign
  output logic         neg    // add-one bit for a negative digit, weight of q[0]
);

  // x extended by one bit at each end: xe[j+1] = x[j], xe[0] = x[-1] = 0.
  logic [N+1:0] xe;
  logic [N:0]   s;

  assign xe = {x[N-1], x, 1'b0};

  for (genvar j = 0; j <= N; j++) begin : g_cell
    pp_select u_sel (
      .x_j   (xe[j+1]),
      .x_jm1 (xe[j]),
      .ctrl  (ctrl),
      .s     (s[j])
    );
  end

  assign q   = {~s[N], s[N-1:0]};
  assign neg = ctrl.neg;

endmodule
