// Reference model for the fixed-width Booth multiplier testbenches.
//
// It rebuilds the partial-product array arithmetically, independently of the
// RTL's selector cells: the Booth digit z_i = y[2i-1] + y[2i] - 2*y[2i+1] is
// computed as an integer, the row is |z_i|*x in (n+1)-bit two's complement,
// inverted for a negative digit (y[2i+1] = 1), with the neg bit at column 2i.
// From it the model takes
//   lp      value of all array bits in columns 0..n-2 (the truncated part)
//   sigma   number of ones in column n-2 (the LPmajor column)
//   comp    floor((sigma + n/4 + 1) / 2)
// and the expected output ((x*y - lp + comp*2^(n-1)) mod 2^2n) >> n,
// which is exactly what the kept columns plus the correction give.
package fwb_ref_pkg;

  function automatic longint sx(longint v, int n);  // sign-extend an n-bit value
    return (v >= (longint'(1) << (n - 1))) ? v - (longint'(1) << n) : v;
  endfunction

  function automatic int digit(longint y, int n, int i);
    int ym1, y0, y1;
    ym1 = (i == 0) ? 0 : int'((y >> (2 * i - 1)) & 1);
    y0  = int'((y >> (2 * i)) & 1);
    y1  = int'((y >> (2 * i + 1)) & 1);
    return ym1 + y0 - 2 * y1;
  endfunction

  // Expected N-bit output; also returns comp and the exact product.
  function automatic longint expect_p(longint x, longint y, int n,
                                      output int comp, output longint exact);
    longint xs, lp, row, mask_row, full, mp;
    int     sigma, z, az, negb;
    xs       = sx(x, n);
    exact    = xs * sx(y, n);
    lp       = 0;
    sigma    = 0;
    mask_row = (longint'(1) << (n + 1)) - 1;
    for (int i = 0; i < n / 2; i++) begin
      z    = digit(y, n, i);
      negb = int'((y >> (2 * i + 1)) & 1);
      az   = (z < 0) ? -z : z;
      row  = (longint'(az) * xs) & mask_row;
      if (negb != 0) row = ~row & mask_row;
      for (int j = 0; j <= n; j++) begin
        int col;
        col = 2 * i + j;
        if (col <= n - 2 && ((row >> j) & 1) != 0) lp += longint'(1) << col;
        if (col == n - 2 && ((row >> j) & 1) != 0) sigma++;
      end
      lp += longint'(negb) << (2 * i);
      if (2 * i == n - 2) sigma += negb;
    end
    comp = (sigma + n / 4 + 1) / 2;
    full = (longint'(1) << (2 * n)) - 1;
    mp   = (exact - lp + (longint'(comp) << (n - 1))) & full;
    return (mp >> n) & ((longint'(1) << n) - 1);
  endfunction

endpackage
