// Self-checking testbench for booth_pp_row at its default width (N = 12).
// For random and extreme multiplicands and every Booth control word the
// encoder can produce, the row read as a signed (N+1)-bit number (the
// inverted sign bit turned back) plus its neg bit must equal digit * x.
module tb_booth_pp_row;
  import fwb_pkg::*;
  localparam int N = 12;

  logic [N-1:0] x;
  booth_ctrl_t  ctrl;
  logic [N:0]   q;
  logic         neg;
  int           checks = 0, failures = 0;

  // control words of the digits 0, +1, +2, -2, -1, -0
  localparam logic [2:0] CW [6] = '{3'b000, 3'b010, 3'b001, 3'b101, 3'b110, 3'b100};
  localparam int         DIG [6] = '{0, 1, 2, -2, -1, 0};

  booth_pp_row dut (.x(x), .ctrl(ctrl), .q(q), .neg(neg));

  task automatic check(logic [N-1:0] vx);
    logic [N:0] row;
    longint     got, expv;
    x = vx;
    for (int c = 0; c < 6; c++) begin
      ctrl = booth_ctrl_t'(CW[c]);
      #1;
      row  = {~q[N], q[N-1:0]};
      got  = longint'($signed(row)) + longint'(neg);
      expv = longint'(DIG[c]) * longint'($signed(vx));
      checks++;
      if (got != expv || neg != CW[c][2]) begin
        failures++;
        $display("FAIL x=%0d digit=%0d: row gives %0d expected %0d", $signed(vx), DIG[c], got, expv);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check({1'b1, {(N-1){1'b0}}});  // most negative
    check({1'b0, {(N-1){1'b1}}});  // most positive
    check('0);
    check('1);
    for (int n = 0; n < 500; n++) check(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
