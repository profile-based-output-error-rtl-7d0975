// nr_trunc_divider_tb: self-checking test of the truncated non-restoring
// array divider.
//  * 8-by-4, exhaustive over all dividend/divisor pairs whose quotient fits
//    4 bits (a[7:4] < d), for k = 0..3: the quotient must be
//    ((a / d) >> k) << k with the k low bits replaced by 2^(k-1), and the
//    remainder must be (a >> k) mod d.
//  * 16-by-8, 100000 random valid pairs, k = 0, 1, 2, 4, same rules.
//  * 32-by-16, 20000 random valid pairs, k = 4 and 8, same rules.
//  * Mean signed quotient error (exact - approximate): over the exhaustive
//    8-by-4 set it must be exactly (2^k-1)/2 without padding and -1/2 with
//    it; over the random 16-by-8 set, with padding, within 0.1 of -1/2.
module nr_trunc_divider_tb;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
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

  logic [7:0]  a4;
  logic [3:0]  d4;
  logic [3:0]  q4 [4], r4 [4];
  for (genvar k = 0; k < 4; k++) begin : g4
    nr_trunc_divider #(.N(4), .K(k)) u (.a(a4), .d(d4), .q(q4[k]), .r(r4[k]));
  end

  logic [15:0] a8;
  logic [7:0]  d8;
  logic [7:0]  q8 [4], r8 [4];
  localparam int K8 [4] = '{0, 1, 2, 4};
  for (genvar c = 0; c < 4; c++) begin : g8
    nr_trunc_divider #(.N(8), .K(K8[c])) u (.a(a8), .d(d8), .q(q8[c]), .r(r8[c]));
  end

  logic [31:0] a16;
  logic [15:0] d16;
  logic [15:0] q16 [2], r16 [2];
  localparam int K16 [2] = '{4, 8};
  for (genvar c = 0; c < 2; c++) begin : g16
    nr_trunc_divider #(.N(16), .K(K16[c])) u (.a(a16), .d(d16), .q(q16[c]), .r(r16[c]));
  end

  function automatic int qref(input int a, input int d, input int k);
    int q = a / d;
    if (k == 0) return q;
    return ((q >> k) << k) | (1 << (k - 1));
  endfunction

  int n_pairs = 0;

  initial begin
    automatic longint e_pad [4], e_nopad [4];
    automatic int mq [4], mr [4];

    foreach (e_pad[i]) begin e_pad[i] = 0; e_nopad[i] = 0; mq[i] = 0; mr[i] = 0; end
    for (int d = 1; d < 16; d++) begin
      for (int a = 0; a < (d << 4); a++) begin
        a4 = 8'(a); d4 = 4'(d);
        #1;
        n_pairs++;
        for (int k = 0; k < 4; k++) begin
          if (int'(q4[k]) != qref(a, d, k)) mq[k]++;
          if (int'(r4[k]) != ((a >> k) % d)) mr[k]++;
          e_pad[k]   += (a / d) - int'(q4[k]);
          e_nopad[k] += (a / d) - ((a / d) >> k << k);
        end
      end
    end
    for (int k = 0; k < 4; k++) begin
      check(mq[k] == 0, $sformatf("8-by-4 k=%0d: %0d quotients wrong", k, mq[k]));
      check(mr[k] == 0, $sformatf("8-by-4 k=%0d: %0d remainders wrong", k, mr[k]));
      if (k > 0) begin
        check(2 * e_nopad[k] == longint'((1 << k) - 1) * n_pairs,
              $sformatf("8-by-4 k=%0d: unpadded mean error is not (2^k-1)/2", k));
        check(2 * e_pad[k] == -longint'(n_pairs),
              $sformatf("8-by-4 k=%0d: padded mean error is not -1/2", k));
      end
      $display("8-by-4 k=%0d ASE(exact-inexact) without=%f with=%f", k,
               real'(e_nopad[k]) / real'(n_pairs), real'(e_pad[k]) / real'(n_pairs));
    end

    foreach (e_pad[i]) begin e_pad[i] = 0; e_nopad[i] = 0; mq[i] = 0; mr[i] = 0; end
    for (int t = 0; t < 100000; t++) begin
      automatic int a, d;
      d = 1 + int'($urandom_range(254));
      a = int'($urandom_range(d * 256 - 1));
      if (t == 0) begin d = 255; a = 255 * 256 - 1; end
      if (t == 1) begin d = 1;   a = 255; end
      a8 = 16'(a); d8 = 8'(d);
      #1;
      for (int c = 0; c < 4; c++) begin
        automatic int k = K8[c];
        if (int'(q8[c]) != qref(a, d, k)) mq[c]++;
        if (int'(r8[c]) != ((a >> k) % d)) mr[c]++;
        e_pad[c]   += (a / d) - int'(q8[c]);
        e_nopad[c] += (a / d) - ((a / d) >> k << k);
      end
    end
    for (int c = 0; c < 4; c++) begin
      check(mq[c] == 0, $sformatf("16-by-8 k=%0d: %0d quotients wrong", K8[c], mq[c]));
      check(mr[c] == 0, $sformatf("16-by-8 k=%0d: %0d remainders wrong", K8[c], mr[c]));
      if (K8[c] > 0) begin
        check(real'(e_pad[c]) / 100000.0 > -0.6 && real'(e_pad[c]) / 100000.0 < -0.4,
              $sformatf("16-by-8 k=%0d: padded mean error far from -1/2", K8[c]));
      end
      $display("16-by-8 k=%0d ASE(exact-inexact) without=%f with=%f", K8[c],
               real'(e_nopad[c]) / 100000.0, real'(e_pad[c]) / 100000.0);
    end

    // 32-by-16, k = 4 and 8, random valid pairs
    foreach (mq[i]) begin mq[i] = 0; mr[i] = 0; end
    for (int t = 0; t < 20000; t++) begin
      automatic longint a, d, qx;
      d = 1 + longint'($urandom_range(65534));
      a = ((longint'($urandom) << 32 | longint'($urandom)) & 64'hffffffff) % (d << 16);
      if (t == 0) begin d = 65535; a = 65535 * 65536 - 1; end
      a16 = 32'(a); d16 = 16'(d);
      #1;
      qx = a / d;
      for (int c = 0; c < 2; c++) begin
        automatic int k = K16[c];
        if (longint'(q16[c]) != (((qx >> k) << k) | (longint'(1) << (k - 1)))) mq[c]++;
        if (longint'(r16[c]) != ((a >> k) % d)) mr[c]++;
      end
    end
    for (int c = 0; c < 2; c++) begin
      check(mq[c] == 0, $sformatf("32-by-16 k=%0d: %0d quotients wrong", K16[c], mq[c]));
      check(mr[c] == 0, $sformatf("32-by-16 k=%0d: %0d remainders wrong", K16[c], mr[c]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
