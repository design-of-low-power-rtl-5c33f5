// Random testbench of fw_booth_mult at N = 16, the largest size of the
// published delay comparison: random and corner operands checked bit-exactly
// against the reference model, error within 1.5 output LSBs per vector and
// 0.1 LSB on average.
module tb_fw_booth_mult_n16;
  localparam int N = 16;

  logic [N-1:0] x, y, p;
  logic         done;

  fw_booth_mult #(.N(N)) dut (.x(x), .y(y), .p(p));

  fwb_checker #(.N(N), .EXHAUST(1'b0), .NRAND(200000), .MAX_ERR(1.5), .MAX_MEAN(0.1)) chk (
    .x(x), .y(y), .p(p), .done(done));

  initial begin
    #10000000;
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures + 1);
    $finish;
  end

  initial begin
    @(posedge done);
    $display("TB_RESULT checks=%0d failures=%0d", chk.checks, chk.failures);
    $finish;
  end
endmodule
