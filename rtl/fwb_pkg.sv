// Shared types and helpers for the fixed-width radix-4 Booth multiplier.
//
// booth_ctrl_t is the three-bit control word a Booth encoder sends to the
// partial-product selector cells of one row. Bit 2 (neg) inverts the selected
// multiple, bit 1 (one) selects x[j], bit 0 (two) selects x[j-1] (the
// multiplicand shifted left by one). The bit order is the Ctrl[2:0] order of
// the published encoding table; the field names are this design's own.
package fwb_pkg;

  typedef struct packed {
    logic neg;  // Ctrl[2]: negative digit, invert the selected multiple
    logic one;  // Ctrl[1]: digit magnitude 1, pick x[j]
    logic two;  // Ctrl[0]: digit magnitude 2, pick x[j-1]
  } booth_ctrl_t;

  // Number of radix-4 Booth digits (partial-product rows) of an n-bit multiplier.
  function automatic int unsigned booth_rows(int unsigned n);
    return n / 2;
  endfunction

  // Number of bits needed to hold the value v (at least 1).
  function automatic int unsigned bits_for(int unsigned v);
    int unsigned b;
    b = 1;
    while ((v >> b) != 0) b++;
    return b;
  endfunction

endpackage
