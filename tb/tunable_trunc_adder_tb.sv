// tunable_trunc_adder_tb: self-checking test of the 8-bit tunable truncated
// adder.
//  1. Bit-exact check, all 65536 operand pairs, truncation k = 0..4 with
//     padding all ones and all zeros: the result must equal
//     ((a >>> k) + (b >>> k)) << k with the low k bits taken from pad.
//  2. Error statistics over the pairs whose exact sum does not overflow
//     8 bits (49152 pairs), reproducing the published figures:
//     k = 2, padding 00/01/10/11: zero-error count 3072/6144/9216/12288,
//     largest error -6/-5/-4/-3, mean |error| 3/2.125/1.5/1.25,
//     mean signed error -3/-2/-1/0;
//     k = 1..4 without padding: mean signed error -1/-3/-7/-15, with
//     all-ones padding: 0.
module tunable_trunc_adder_tb;
  localparam int N = 8;
  localparam int VALID = 49152;

  logic [N-1:0]   a, b;
  logic [N/2-1:0] con, pad;
  logic [N:0]     sum;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  tunable_trunc_adder #(.N(N)) dut (.a(a), .b(b), .con(con), .pad(pad), .sum(sum));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Runs all pairs at truncation k with padding value pv; returns statistics
  // over the non-overflowing pairs.
  task automatic sweep(input int k, input int pv,
                       output int zero_cnt, output int worst,
                       output longint abs_sum, output longint sgn_sum,
                       output int mism);
    zero_cnt = 0; worst = 0; abs_sum = 0; sgn_sum = 0; mism = 0;
    con = 4'((1 << k) - 1);
    pad = 4'(pv);
    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        int sa, sb, exact, expct, got, err;
        a = 8'(ia); b = 8'(ib);
        #1;
        sa = int'($signed(a)); sb = int'($signed(b));
        exact = sa + sb;
        expct = (((sa >>> k) + (sb >>> k)) << k) + (pv & ((1 << k) - 1));
        got   = int'($signed(sum));
        if (got != expct) mism++;
        if (exact >= -128 && exact <= 127) begin
          err = got - exact;
          if (err == 0) zero_cnt++;
          if ((err < 0 ? -err : err) > (worst < 0 ? -worst : worst) ||
              ((err < 0 ? -err : err) == (worst < 0 ? -worst : worst) && err < worst))
            worst = err;
          abs_sum += longint'((err < 0) ? -err : err);
          sgn_sum += longint'(err);
        end
      end
    end
  endtask

  initial begin
    int zc, worst, mism;
    longint asum, ssum;
    static int exp_zero[4]  = '{3072, 6144, 9216, 12288};
    static int exp_worst[4] = '{-6, -5, -4, -3};
    // mean |error| * 8 and mean signed error, per padding value
    static int exp_abs8[4]  = '{24, 17, 12, 10};
    static int exp_ase[4]   = '{-3, -2, -1, 0};

    // Table of k = 2 statistics for each padding value.
    for (int pv = 0; pv < 4; pv++) begin
      sweep(2, pv, zc, worst, asum, ssum, mism);
      check(mism == 0, $sformatf("k=2 pad=%0d: %0d results differ from reference", pv, mism));
      check(zc == exp_zero[pv], $sformatf("k=2 pad=%0d zero-error count %0d", pv, zc));
      check(worst == exp_worst[pv], $sformatf("k=2 pad=%0d largest error %0d", pv, worst));
      check(asum * 8 == longint'(exp_abs8[pv]) * VALID,
            $sformatf("k=2 pad=%0d mean |error| %0d/%0d", pv, asum, VALID));
      check(ssum == longint'(exp_ase[pv]) * VALID,
            $sformatf("k=2 pad=%0d mean signed error %0d/%0d", pv, ssum, VALID));
      $display("k=2 pad=%0d: zero=%0d worst=%0d mean|e|=%f ase=%f", pv, zc, worst,
               real'(asum) / VALID, real'(ssum) / VALID);
    end

    // Mean signed error with and without padding, k = 0..4.
    for (int k = 0; k <= 4; k++) begin
      sweep(k, 0, zc, worst, asum, ssum, mism);
      check(mism == 0, $sformatf("k=%0d no padding: %0d mismatches", k, mism));
      check(ssum == -longint'((1 << k) - 1) * VALID,
            $sformatf("k=%0d no padding ASE %0d/%0d", k, ssum, VALID));
      sweep(k, 15, zc, worst, asum, ssum, mism);
      check(mism == 0, $sformatf("k=%0d padding ones: %0d mismatches", k, mism));
      check(ssum == 0, $sformatf("k=%0d padded ASE %0d/%0d", k, ssum, VALID));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
