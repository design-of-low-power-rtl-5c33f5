// Radix-4 (modified) Booth encoder for one multiplier digit.
//
// It looks at the overlapping triplet y[2i+1], y[2i], y[2i-1] of the
// multiplier and produces the control word of one partial-product row:
// the digit z = y[2i-1] + y[2i] - 2*y[2i+1] in {-2,-1,0,1,2}.
//   ctrl.neg = y[2i+1]
//   ctrl.one = y[2i] xor y[2i-1]                  (|z| = 1)
//   ctrl.two = y[2i+1] ? ~(y[2i] | y[2i-1])       (z = -2)
//                      :  (y[2i] & y[2i-1])       (z = +2)
// The truth table follows the published encoding table exactly, including
// the digit "-0" (triplet 111), which gives neg=1 with no magnitude bit set;
// the row then becomes all ones and the neg bit added at the row's least
// significant column brings it back to zero. The two-level form of ctrl.two
// (two candidate terms chosen by y[2i+1]) follows the encoder drawing, which
// shows a 2:1 multiplexer steered by y[2i+1]. ctrl.neg is y[2i+1] itself,
// so that output is a plain wire from the input. Purely combinational.
module booth_encoder
  import fwb_pkg::*;
(
  input  logic        y_hi,   // y[2i+1]
  input  logic        y_mid,  // y[2i]
  input  logic        y_lo,   // y[2i-1] (0 for the first digit)
  output booth_ctrl_t ctrl
);

  logic two_pos;  // multiplexer input taken when y[2i+1] = 0
  logic two_neg;  // multiplexer input taken when y[2i+1] = 1

  always_comb begin
    two_pos   = y_mid & y_lo;
    two_neg   = ~(y_mid | y_lo);
    ctrl.neg  = y_hi;
    ctrl.one  = y_mid ^ y_lo;
    ctrl.two  = y_hi ? two_neg : two_pos;
  end

endmodule
