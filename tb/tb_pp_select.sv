// Self-checking testbench for pp_select.
// Drives every combination of x[j], x[j-1] and the valid control words and
// checks the selected bit: x[j] for a magnitude-1 digit, x[j-1] for a
// magnitude-2 digit, 0 for a zero digit, inverted when the digit is negative.
module tb_pp_select;
  import fwb_pkg::*;

  logic        x_j, x_jm1, s;
  booth_ctrl_t ctrl;
  int          checks = 0, failures = 0;

  pp_select dut (.x_j(x_j), .x_jm1(x_jm1), .ctrl(ctrl), .s(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      for (int xv = 0; xv < 4; xv++) begin
        logic sel, exp_s;
        ctrl        = booth_ctrl_t'(c[2:0]);
        {x_j, x_jm1} = 2'(xv);
        #1;
        // which bit a digit of this control word selects
        if (ctrl.one && ctrl.two) sel = x_j | x_jm1;  // not produced by the encoder
        else if (ctrl.one)        sel = x_j;
        else if (ctrl.two)        sel = x_jm1;
        else                      sel = 1'b0;
        exp_s = ctrl.neg ? ~sel : sel;
        checks++;
        if (s !== exp_s) begin
          failures++;
          $display("FAIL ctrl=%03b x_j=%b x_jm1=%b: s=%b expected %b", c[2:0], x_j, x_jm1, s, exp_s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
