// Half adder built from AND, OR and inverter gates.
//
// sum = (a & ~b) | (~a & b), cout = a & b. The exclusive-OR is written in
// its AND-OR-inverter form, which is what the published gate-count table
// assumes (three gate delays, six gates including the carry AND).
// Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = (a & ~b) | (~a & b);
    cout = a & b;
  end

endmodule
