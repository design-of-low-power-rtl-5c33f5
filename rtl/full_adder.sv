// Full adder built from AND, OR and inverter gates.
//
// The structure follows the published full-adder gate diagram, which counts
// 13 gates and 6 gate delays:
//   t    = (a & ~b) | (~a & b)          first exclusive-OR, stages 1-3
//   sum  = (t & ~cin) | (~t & cin)      second exclusive-OR, stages 4-6
//   cout = (a & b) | (t & cin)
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic t;

  always_comb begin
    t    = (a & ~b) | (~a & b);
    sum  = (t & ~cin) | (~t & cin);
    cout = (a & b) | (t & cin);
  end

endmodule
