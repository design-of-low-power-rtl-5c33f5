// Checking harness shared by the multiplier testbenches.
//
// It drives x and y of a fixed-width Booth multiplier (connected by the
// instantiating testbench) and, after each vector, compares p with the
// reference model of fwb_ref_pkg. It also measures the approximation error
// against the exact product, in output LSBs, and checks it against MAX_ERR
// per vector and MAX_MEAN on average. It counts how often each mechanism of
// the design was exercised: each Booth digit value (-2, -1, 0, +0 from 111,
// +1, +2), every correction value from the smallest to the largest the
// LPmajor column can give, negative products and saturated operands; a
// mechanism never seen counts as a failure.
module fwb_checker #(
  parameter int    N        = 8,
  parameter bit    EXHAUST  = 1'b0,  // all 2^(2N) operand pairs
  parameter int    NRAND    = 1000,  // random pairs when not exhaustive
  parameter real   MAX_ERR  = 1.5,   // per-vector error bound, output LSBs
  parameter real   MAX_MEAN = 0.1    // bound on the mean error, output LSBs
) (
  output logic [N-1:0] x,
  output logic [N-1:0] y,
  input  logic [N-1:0] p,
  output logic         done
);
  import fwb_ref_pkg::*;

  localparam int R       = N / 2;
  localparam int OFFSET  = N / 4 + 1;
  localparam int COMPMIN = OFFSET / 2;
  localparam int COMPMAX = (R + 1 + OFFSET) / 2;

  int     checks = 0, failures = 0;
  int     dig_cnt [6];            // -2, -1, 0 (000), -0 (111), +1, +2
  int     comp_cnt [COMPMAX + 1];
  int     neg_cnt = 0, ext_cnt = 0;
  real    err_sum = 0.0, err_max = 0.0;
  longint nvec = 0;

  task automatic apply(longint vx, longint vy);
    longint pe, exact;
    int     comp;
    real    err;
    x = N'(vx);
    y = N'(vy);
    #1;
    pe = expect_p(vx, vy, N, comp, exact);
    checks++;  // one check per vector: bit-exact result, error within bound
    if (longint'(p) != pe) begin
      failures++;
      if (failures < 10)
        $display("FAIL N=%0d x=%0d y=%0d: p=%0d expected %0d", N, sx(vx, N), sx(vy, N),
                 sx(longint'(p), N), sx(pe, N));
    end
    err = real'(sx(longint'(p), N)) - real'(exact) / real'(longint'(1) << N);
    err_sum += err;
    nvec++;
    if ((err < 0 ? -err : err) > err_max) err_max = (err < 0 ? -err : err);
    if ((err < 0 ? -err : err) > MAX_ERR && longint'(p) == pe) begin
      // bit-exact but outside the error bound: the correction rule is off
      failures++;
      if (failures < 10) $display("FAIL N=%0d x=%0d y=%0d: error %f LSB", N, sx(vx, N), sx(vy, N), err);
    end
    // mechanism coverage
    for (int i = 0; i < R; i++) begin
      int tri_v;
      tri_v = int'(((vy << 1) >> (2 * i)) & 7);
      case (tri_v)
        0: dig_cnt[2]++;
        7: dig_cnt[3]++;
        1, 2: dig_cnt[4]++;
        3: dig_cnt[5]++;
        4: dig_cnt[0]++;
        default: dig_cnt[1]++;
      endcase
    end
    if (comp <= COMPMAX) comp_cnt[comp]++;
    if (exact < 0) neg_cnt++;
    if (sx(vx, N) == -(longint'(1) << (N - 1)) || sx(vy, N) == -(longint'(1) << (N - 1))) ext_cnt++;
  endtask

  initial begin
    done = 1'b0;
    foreach (dig_cnt[k]) dig_cnt[k] = 0;
    foreach (comp_cnt[k]) comp_cnt[k] = 0;
    // corners
    apply(longint'(1) << (N - 1), longint'(1) << (N - 1));
    apply(longint'(1) << (N - 1), (longint'(1) << (N - 1)) - 1);
    apply((longint'(1) << (N - 1)) - 1, (longint'(1) << (N - 1)) - 1);
    apply((longint'(1) << N) - 1, (longint'(1) << N) - 1);
    apply(0, 0);
    // all correction values: y = 0 gives sigma 0; x = -1 with y of all
    // digit -1 patterns sets every LPmajor bit
    apply((longint'(1) << N) - 1, longint'({N{2'b01}}) & ((longint'(1) << N) - 1));
    if (EXHAUST) begin
      for (longint a = 0; a < (longint'(1) << N); a++)
        for (longint b = 0; b < (longint'(1) << N); b++) apply(a, b);
    end else begin
      for (int k = 0; k < NRAND; k++)
        apply(longint'($urandom) & ((longint'(1) << N) - 1),
              longint'($urandom) & ((longint'(1) << N) - 1));
    end
    // coverage verdicts
    $display("N=%0d vectors=%0d mean error %f LSB, max |error| %f LSB", N, nvec, err_sum / real'(nvec), err_max);
    $display("Booth digits seen: -2:%0d -1:%0d 0:%0d -0:%0d +1:%0d +2:%0d",
             dig_cnt[0], dig_cnt[1], dig_cnt[2], dig_cnt[3], dig_cnt[4], dig_cnt[5]);
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (dig_cnt[k] == 0) begin
        failures++;
        $display("FAIL Booth digit class %0d never exercised", k);
      end
    end
    for (int c = COMPMIN; c <= COMPMAX; c++) begin
      $display("correction %0d applied %0d times", c, comp_cnt[c]);
      checks++;
      if (comp_cnt[c] == 0) begin
        failures++;
        $display("FAIL correction value %0d never exercised", c);
      end
    end
    checks++;
    if (neg_cnt == 0 || ext_cnt == 0) begin
      failures++;
      $display("FAIL negative products (%0d) or most-negative operands (%0d) never exercised", neg_cnt, ext_cnt);
    end
    checks++;
    if ((err_sum / real'(nvec) < 0 ? -err_sum / real'(nvec) : err_sum / real'(nvec)) > MAX_MEAN) begin
      failures++;
      $display("FAIL mean error %f LSB above %f", err_sum / real'(nvec), MAX_MEAN);
    end
    done = 1'b1;
  end
endmodule
