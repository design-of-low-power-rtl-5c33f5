// W-bit ripple-carry adder made of full-adder cells.
//
// sum = a + b + cin (mod 2^W), cout is the carry out of the top bit.
// It is the carry-propagate row that ends each partial-product block and
// the final adder row that merges the blocks. The published architecture
// draws both as rows of ripple-connected adder cells; using full-adder cells
// at every position (constant inputs are reduced by synthesis) is this
// design's choice. Purely combinational; the carry ripples through W full
// adders.
module ripple_adder #(
  parameter int unsigned W = 13
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar k = 0; k < W; k++) begin : g_bit
    full_adder u_fa (
      .a    (a[k]),
      .b    (b[k]),
      .cin  (c[k]),
      .sum  (sum[k]),
      .cout (c[k+1])
    );
  end

  assign cout = c[W];

endmodule
