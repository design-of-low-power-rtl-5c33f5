// Self-checking testbench for booth_encoder.
// Applies all eight multiplier triplets and compares the control word with
// the modified Booth encoding table (digit and Ctrl[2:0]) written out below,
// and checks that the selected multiple matches the digit value
// y[2i-1] + y[2i] - 2*y[2i+1].
module tb_booth_encoder;
  import fwb_pkg::*;

  logic        y_hi, y_mid, y_lo;
  booth_ctrl_t ctrl;
  int          checks = 0, failures = 0;

  // Expected Ctrl[2:0] for triplet {y[2i+1], y[2i], y[2i-1]} = 0..7
  localparam logic [2:0] EXP [8] = '{3'b000, 3'b010, 3'b010, 3'b001,
                                     3'b101, 3'b110, 3'b110, 3'b100};

  booth_encoder dut (.y_hi(y_hi), .y_mid(y_mid), .y_lo(y_lo), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 8; t++) begin
      int digit, mag;
      {y_hi, y_mid, y_lo} = 3'(t);
      #1;
      checks++;
      if (ctrl !== EXP[t]) begin
        failures++;
        $display("FAIL triplet %03b: ctrl=%03b expected %03b", t[2:0], ctrl, EXP[t]);
      end
      digit = int'(y_lo) + int'(y_mid) - 2 * int'(y_hi);
      mag   = int'(ctrl.one) + 2 * int'(ctrl.two);
      checks++;
      if ((ctrl.neg ? -mag : mag) != digit) begin
        failures++;
        $display("FAIL triplet %03b: digit %0d, ctrl gives %0d", t[2:0], digit, ctrl.neg ? -mag : mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
