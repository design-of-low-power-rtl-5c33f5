// Self-checking testbench for ripple_adder at its default width.
// Random and corner operands (all ones, carry through every bit) with both
// carry-in values, compared with a + b + cin computed in a wider integer.
module tb_ripple_adder;
  localparam int W = 13;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int           checks = 0, failures = 0;

  ripple_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic apply(logic [W-1:0] va, logic [W-1:0] vb, logic vc);
    longint unsigned total;
    a = va; b = vb; cin = vc;
    #1;
    total = longint'(va) + longint'(vb) + longint'(vc);
    checks++;
    if ({cout, sum} != (W+1)'(total)) begin
      failures++;
      $display("FAIL %0d + %0d + %0d: got %0d expected %0d", va, vb, vc, {cout, sum}, total);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    if ($bits(sum) != W) begin
      failures++;
      $display("FAIL default width %0d, expected %0d", $bits(sum), W);
    end
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('0, '0, 1'b0);
    apply({1'b0, {(W-1){1'b1}}}, W'(1), 1'b0);
    for (int n = 0; n < 2000; n++) apply(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
