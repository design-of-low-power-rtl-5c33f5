// End-to-end testbench of fw_booth_mult at its default width (N = 12).
// All 2^24 operand pairs (plus corners) are checked bit-exactly against the reference
// model of the array (kept columns plus LPmajor correction), and the error
// against the exact product is bounded per vector (1.5 output LSBs) and on
// average (0.1 LSB). Each Booth digit value and every correction value must
// occur at least once.
module tb_fw_booth_mult;
  localparam int N = 12;

  logic [N-1:0] x, y, p;
  logic         done;

  fw_booth_mult dut (.x(x), .y(y), .p(p));

  fwb_checker #(.N(N), .EXHAUST(1'b1), .MAX_ERR(1.5), .MAX_MEAN(0.1)) chk (
    .x(x), .y(y), .p(p), .done(done));

  initial begin
    #100000000;
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures + 1);
    $finish;
  end

  initial begin
    @(posedge done);
    if ($bits(dut.p) != N) begin
      $display("FAIL default width is %0d, expected %0d", $bits(dut.p), N);
      chk.failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures);
    $finish;
  end
endmodule
