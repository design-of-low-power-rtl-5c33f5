// Partial-product block adder: an array of carry-save rows and a ripple row.
//
// It adds ROWS operands of W bits (mod 2^W) in the array style of the
// published architecture: the first three operands enter a row of full
// adders, every further operand enters its own full-adder row together with
// the sums and the shifted carries of the row above, and a ripple-carry row
// resolves the last sums and carries. The multiplier uses two of these, one
// per block of partial-product rows (Block 1 and Block 2), which run in
// parallel; the delay through a block grows with the rows it holds, not with
// the rows of the whole multiplier. Operand bits that are constant zero or
// one are simplified away by synthesis, so a full-adder position with a zero
// input becomes a half adder or a wire, as in the drawing. The one position
// that is structurally empty, bit 0 of the shifted carries in every row after
// the first, uses a half-adder cell.
// Fewer than three operands are padded with zero operands.
// Purely combinational. Output: sum of all operands mod 2^W.
module csa_block_adder #(
  parameter int unsigned ROWS = 4,   // number of operands
  parameter int unsigned W    = 13   // operand and result width
) (
  input  logic [ROWS-1:0][W-1:0] ops,
  output logic [W-1:0]           sum
);

  localparam int unsigned NR = (ROWS < 3) ? 3 : ROWS;  // operands after padding
  localparam int unsigned NS = NR - 2;                   // carry-save rows

  logic [NR-1:0][W-1:0] op_p;
  logic [NS-1:0][W-1:0] s_row;  // sums of each carry-save row
  logic [NS-1:0][W-1:0] c_row;  // carries of each carry-save row (unshifted)
  logic                 unused_cout;

  always_comb begin
    op_p = '0;
    for (int r = 0; r < int'(ROWS); r++) op_p[r] = ops[r];
  end

  for (genvar r = 0; r < NS; r++) begin : g_row
    logic [W-1:0] in_a, in_c;
    logic [W-1:1] in_b;  // bit 0 is empty after the carry shift (rows r > 0)
    if (r == 0) begin : g_first
      assign in_a = op_p[0];
      assign in_b = op_p[1][W-1:1];
    end else begin : g_next
      assign in_a = s_row[r-1];
      assign in_b = c_row[r-1][W-2:0];
    end
    assign in_c = op_p[r+2];
    for (genvar k = 0; k < W; k++) begin : g_cell
      if (r == 0 && k == 0) begin : g_fa0
        full_adder u_fa (
          .a    (in_a[k]),
          .b    (op_p[1][0]),
          .cin  (in_c[k]),
          .sum  (s_row[r][k]),
          .cout (c_row[r][k])
        );
      end else if (k == 0) begin : g_ha
        // the shifted carries leave bit 0 empty: a half adder is enough
        half_adder u_ha (
          .a    (in_a[k]),
          .b    (in_c[k]),
          .sum  (s_row[r][k]),
          .cout (c_row[r][k])
        );
      end else begin : g_fa
        full_adder u_fa (
          .a    (in_a[k]),
          .b    (in_b[k]),
          .cin  (in_c[k]),
          .sum  (s_row[r][k]),
          .cout (c_row[r][k])
        );
      end
    end
  end

  ripple_adder #(.W(W)) u_cpa (
    .a    (s_row[NS-1]),
    .b    ({c_row[NS-1][W-2:0], 1'b0}),
    .cin  (1'b0),
    .sum  (sum),
    .cout (unused_cout)
  );

endmodule
