// Self-checking testbench for half_adder: all four input combinations,
// compared with the arithmetic sum a + b.
module tb_half_adder;
  logic a, b, sum, cout;
  int   checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int total;
      {a, b} = 2'(v);
      #1;
      total = int'(a) + int'(b);
      checks++;
      if ({cout, sum} != 2'(total)) begin
        failures++;
        $display("FAIL a=%b b=%b: cout,sum=%b%b expected %0d", a, b, cout, sum, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
