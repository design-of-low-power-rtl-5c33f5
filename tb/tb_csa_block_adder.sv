// Self-checking testbench for csa_block_adder at its default size
// (4 operands of 13 bits). Random and all-ones operands; the result must be
// the sum of all operands modulo 2^W.
module tb_csa_block_adder;
  localparam int ROWS = 4;
  localparam int W    = 13;

  logic [ROWS-1:0][W-1:0] ops;
  logic [W-1:0]           sum;
  int                     checks = 0, failures = 0;

  csa_block_adder dut (.ops(ops), .sum(sum));

  task automatic check();
    longint unsigned total;
    #1;
    total = 0;
    for (int r = 0; r < ROWS; r++) total += longint'(ops[r]);
    checks++;
    if (sum != W'(total)) begin
      failures++;
      $display("FAIL ops=%h: sum=%h expected %h", ops, sum, W'(total));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ops = '1;
    check();
    ops = '0;
    check();
    for (int n = 0; n < 3000; n++) begin
      for (int r = 0; r < ROWS; r++) ops[r] = W'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
