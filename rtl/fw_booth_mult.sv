// Fixed-width radix-4 Booth multiplier with a decomposed partial-product array.
//
// Multiplies two N-bit two's complement numbers and returns only the N most
// significant bits of the 2N-bit product, p ~= (x*y) / 2^N, without building
// the lower half of the partial-product array.
//
// How it works
//  * N/2 Booth encoders turn the multiplier y into digits in {-2..2}; each
//    digit drives a row of N+1 selector cells (booth_pp_row). Row i sits at
//    column 2i. Sign extension uses the usual constant-one scheme: each row's
//    sign is inverted, a one is added at columns N and N+1 for row 0 and at
//    column N+2i+1 for every later row (all ones of -sum 2^(N+2i) mod 2^2N).
//  * Columns 0..N-2 form the truncated part (LP). Only its top column, N-2
//    (LPmajor), is looked at: lpmajor_comp turns the number of ones there
//    into a correction added at column N-1.
//  * Columns N-1..2N-1 (the kept part, MP, W = N+1 columns) are split by rows
//    into two blocks that are summed in parallel, each by its own carry-save
//    array and ripple row: Block 1 holds rows 0..R1-1, Block 2 the remaining
//    rows, the correction and the constant one of column 2N-1. Splitting the
//    rows halves the number of array rows a carry must cross, which is where
//    the delay gain over a single array comes from.
//  * A final ripple row adds the two block sums; its bit 0 (column N-1) only
//    serves as a rounding position and is dropped, bits 1..N are p.
// The split into two blocks, the LPmajor column and the MP/LP division follow
// the published partial-product diagram (drawn for N = 8); the correction rule,
// the placement of the correction and constants in Block 2, and the default
// width N = 12 (the size of the published synthesis results) are choices of
// this design.
//
// Interface: x, y in, p out; all two's complement. Purely combinational,
// no clock and no latency.
module fw_booth_mult
  import fwb_pkg::*;
#(
  parameter int unsigned N = 12  // operand and product width, even, >= 4
) (
  input  logic [N-1:0] x,  // multiplicand
  input  logic [N-1:0] y,  // multiplier
  output logic [N-1:0] p   // N most significant bits of x*y, approximated
);

  localparam int unsigned R      = N / 2;        // Booth rows
  localparam int unsigned R1     = R / 2;        // rows in Block 1
  localparam int unsigned R2     = R - R1;       // rows in Block 2
  localparam int unsigned W      = N + 1;        // kept columns N-1 .. 2N-1
  localparam int unsigned NB     = R + 1;        // LPmajor bits
  localparam int unsigned OFFSET = N / 4 + 1;
  localparam int unsigned CW     = bits_for((NB + OFFSET) / 2);

  // Booth encoding and partial-product rows
  logic [N:0]       y_ext;          // y_ext[k+1] = y[k], y_ext[0] = y[-1] = 0
  booth_ctrl_t      ctrl [R];
  logic [N:0]       q    [R];
  logic [R-1:0]     neg;

  assign y_ext = {y, 1'b0};

  for (genvar i = 0; i < R; i++) begin : g_row
    booth_encoder u_enc (
      .y_hi  (y_ext[2*i+2]),
      .y_mid (y_ext[2*i+1]),
      .y_lo  (y_ext[2*i]),
      .ctrl  (ctrl[i])
    );
    booth_pp_row #(.N(N)) u_pp (
      .x    (x),
      .ctrl (ctrl[i]),
      .q    (q[i]),
      .neg  (neg[i])
    );
  end

  // Rows cut to the kept columns: bit k of mp_row[i] has weight 2^(N-1+k),
  // i.e. row bit j = N-1+k-2i. The neg bits (columns 2i <= N-2) never land here.
  logic [R-1:0][W-1:0] mp_row;
  always_comb begin
    for (int i = 0; i < int'(R); i++) begin
      for (int k = 0; k < int'(W); k++) begin
        int j;
        j = int'(N) - 1 + k - 2 * i;
        mp_row[i][k] = (j >= 0 && j <= int'(N)) ? q[i][j] : 1'b0;
      end
    end
  end

  // Sign-extension constants, in kept-column coordinates (k = column - (N-1)).
  logic [W-1:0] const1;  // rows of Block 1
  logic [W-1:0] const2;  // rows of Block 2
  always_comb begin
    const1 = '0;
    const2 = '0;
    const1[1] = 1'b1;    // extra one of row 0 at column N
    for (int i = 0; i < int'(R); i++) begin
      if (i < int'(R1)) const1[2*i+2] = 1'b1;  // column N+2i+1
      else              const2[2*i+2] = 1'b1;
    end
  end

  // LPmajor column (column N-2): bit N-2-2i of every row, neg bit of the last row
  logic [NB-1:0] lp_major;
  logic [CW-1:0] comp;
  always_comb begin
    for (int i = 0; i < int'(R); i++) lp_major[i] = q[i][N-2-2*i];
    lp_major[R] = neg[R-1];
  end

  lpmajor_comp #(.NB(NB), .OFFSET(OFFSET), .CW(CW)) u_comp (
    .lp_major (lp_major),
    .comp     (comp)
  );

  // Block 1 and Block 2, summed in parallel
  logic [R1:0][W-1:0]   ops1;
  logic [R2+1:0][W-1:0] ops2;
  logic [W-1:0]         blk1_sum, blk2_sum;

  always_comb begin
    for (int i = 0; i < int'(R1); i++) ops1[i] = mp_row[i];
    ops1[R1] = const1;
    for (int i = 0; i < int'(R2); i++) ops2[i] = mp_row[R1+i];
    ops2[R2]   = const2;
    ops2[R2+1] = W'(comp);
  end

  csa_block_adder #(.ROWS(R1 + 1), .W(W)) u_block1 (
    .ops (ops1),
    .sum (blk1_sum)
  );

  csa_block_adder #(.ROWS(R2 + 2), .W(W)) u_block2 (
    .ops (ops2),
    .sum (blk2_sum)
  );

  // Final adder row
  logic [W-1:0] mp_sum;
  logic         unused_cout;
  logic         unused_round;  // column N-1: rounding position, not output

  ripple_adder #(.W(W)) u_final (
    .a    (blk1_sum),
    .b    (blk2_sum),
    .cin  (1'b0),
    .sum  (mp_sum),
    .cout (unused_cout)
  );

  assign {p, unused_round} = mp_sum;

endmodule
