// change_detection_tb: change detection between two video frames with the
// truncated 16-by-8 divider at K = 1, 2 and 4, against the exact divider.
// Two synthetic 64x64 8-bit frames are generated: a smooth gradient with
// noise, and the same frame with a bright square moved by 9 pixels. Each
// output pixel is the ratio min/max of the two frame pixels, as the quotient
// (min << 8) / max (equal pixels give 255). For each K the test prints the
// PSNR of the approximate ratio image against the exact one, with and without
// the padding, and checks that
//   * every approximate quotient equals the exact quotient with its K low
//     bits replaced by 2^(K-1),
//   * the padding raises the PSNR (lowers the mean square error) for K > 1
//     (at K = 1 padding and truncation give the same error magnitude, 0 or 1,
//     so neither is better in general),
//   * the PSNR falls as K grows.
module change_detection_tb;
  localparam int W = 64;

  logic clk = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
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

  logic [15:0] a;
  logic [7:0]  d;
  logic [7:0]  q [4], r [4];
  localparam int KS [4] = '{0, 1, 2, 4};
  for (genvar c = 0; c < 4; c++) begin : g_div
    nr_trunc_divider #(.N(8), .K(KS[c])) u (.a(a), .d(d), .q(q[c]), .r(r[c]));
  end

  logic [7:0] f0 [W][W];
  logic [7:0] f1 [W][W];
  real se_pad [4], se_nopad [4];
  int  mism [4];
  int  n_moved = 0;
  real psnr_pad [4], psnr_nopad [4];

  initial begin

    foreach (f0[y, x]) begin
      automatic int v = 40 + 2 * x + y + int'($urandom_range(8));
      if (y >= 10 && y < 26 && x >= 10 && x < 26) v = 230;
      f0[y][x] = 8'(v);
    end
    foreach (f1[y, x]) begin
      automatic int v = 40 + 2 * x + y + int'($urandom_range(8));
      if (y >= 10 && y < 26 && x >= 19 && x < 35) v = 230;
      f1[y][x] = 8'(v);
    end
    foreach (se_pad[c]) begin se_pad[c] = 0.0; se_nopad[c] = 0.0; mism[c] = 0; end

    foreach (f0[y, x]) begin
      automatic int p = int'(f0[y][x]), s = int'(f1[y][x]);
      automatic int lo = (p < s) ? p : s;
      automatic int hi = (p < s) ? s : p;
      automatic int qx;
      if (lo == hi) lo = hi - 1;          // keeps the quotient within 8 bits
      if (p != s && (p == 230 || s == 230)) n_moved++;
      a = 16'(lo << 8);
      d = 8'(hi);
      #1;
      qx = (lo << 8) / hi;
      for (int c = 0; c < 4; c++) begin
        automatic int k = KS[c];
        automatic int qref = (k == 0) ? qx : (((qx >> k) << k) | (1 << (k - 1)));
        automatic int qnop = (qx >> k) << k;
        if (int'(q[c]) != qref) mism[c]++;
        se_pad[c]   += real'((int'(q[c]) - qx) * (int'(q[c]) - qx));
        se_nopad[c] += real'((qnop - qx) * (qnop - qx));
      end
    end

    for (int c = 0; c < 4; c++) begin
      check(mism[c] == 0, $sformatf("K=%0d: %0d quotients wrong", KS[c], mism[c]));
      if (c > 0) begin
        psnr_pad[c]   = 10.0 * $log10(255.0 * 255.0 / (se_pad[c] / (W * W)));
        psnr_nopad[c] = 10.0 * $log10(255.0 * 255.0 / (se_nopad[c] / (W * W)));
        $display("K=%0d: PSNR with padding %6.2f dB, without %6.2f dB, MSE ratio %5.2f",
                 KS[c], psnr_pad[c], psnr_nopad[c], se_nopad[c] / se_pad[c]);
        if (KS[c] > 1)
          check(psnr_pad[c] > psnr_nopad[c], $sformatf("K=%0d: padding does not raise the PSNR", KS[c]));
      end
    end
    check(psnr_pad[1] > psnr_pad[2] && psnr_pad[2] > psnr_pad[3], "PSNR does not fall with K");
    check(n_moved > 0, "no moving pixels in the frames");
    $display("%0d pixels changed by the moving square", n_moved);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
