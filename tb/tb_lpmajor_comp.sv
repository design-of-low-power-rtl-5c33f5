// Self-checking testbench for lpmajor_comp at its default size (7 LPmajor
// bits, offset 4). Every input pattern is applied; the correction must be
// floor((number of ones + 4) / 2), counted here bit by bit.
module tb_lpmajor_comp;
  localparam int NB     = 7;
  localparam int OFFSET = 4;

  logic [NB-1:0] lp_major;
  logic [2:0]    comp;
  int            checks = 0, failures = 0;

  lpmajor_comp dut (.lp_major(lp_major), .comp(comp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << NB); v++) begin
      int ones;
      lp_major = NB'(v);
      #1;
      ones = 0;
      for (int b = 0; b < NB; b++) if (v[b]) ones++;
      checks++;
      if (int'(comp) != (ones + OFFSET) / 2) begin
        failures++;
        $display("FAIL lp_major=%b: comp=%0d expected %0d", lp_major, comp, (ones + OFFSET) / 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
