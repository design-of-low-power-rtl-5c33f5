// Exhaustive testbench of fw_booth_mult at N = 8, the size of the published
// architecture drawings: all 65536 operand pairs are checked bit-exactly
// against the reference model, the error against the exact product must
// stay within 1 output LSB and its mean within 0.1 LSB.
module tb_fw_booth_mult_n8;
  localparam int N = 8;

  logic [N-1:0] x, y, p;
  logic         done;

  fw_booth_mult #(.N(N)) dut (.x(x), .y(y), .p(p));

  fwb_checker #(.N(N), .EXHAUST(1'b1), .MAX_ERR(1.0), .MAX_MEAN(0.1)) chk (
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
