// approx_top_tb: end-to-end test of approx_top at its default parameters
// (16-bit matrix-multiplication unit with vertical truncation k = 4,
// 16-by-8 divider with k = 2).
//
//  1. Matrix multiplication: two 4x4 matrices of random signed 16-bit
//     values are multiplied by running every P_ij = sum_k A_ik * B_kj
//     through the unit, feeding S_out back as S_in. Each step is compared
//     bit for bit with a reference model of the truncated multiplier and
//     adder. The product is done twice: adder exact (con = 0) and adder
//     truncated by 8 bits with padding 8'hff (con = pad = 16'h00ff).
//  2. Error statistics of one multiply-accumulate step over 20000 random
//     16-bit A, B, S_in with the adder truncated by 8: the mean signed error
//     with padding must be smaller in magnitude than without (ratio < 1).
//  3. Change detection: two 8x8 frames of 8-bit pixels, the second a copy of
//     the first with a moving square. Each pixel ratio min/max is formed as
//     (min << 8) / max by the divider; the quotient must equal the exact
//     quotient with its 2 low bits replaced by the padding 2'b10, and the
//     unchanged pixels must all give the ratio of equal pixels.
// Each mechanism (exact adder, truncated adder, multiplier truncation error,
// accumulation feedback, divider padding) is counted; one that never
// occurs counts as a failure.
module approx_top_tb;
  import approx_pkg::*;

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

  logic [15:0] mm_a, mm_b, mm_con, mm_pad;
  logic [31:0] mm_s_in, mm_product, mm_s_out;
  logic [15:0] div_a;
  logic [7:0]  div_d, div_q, div_r;

  approx_top dut (
    .mm_a(mm_a), .mm_b(mm_b), .mm_s_in(mm_s_in), .mm_con(mm_con), .mm_pad(mm_pad),
    .mm_product(mm_product), .mm_s_out(mm_s_out),
    .div_a(div_a), .div_d(div_d), .div_q(div_q), .div_r(div_r));

  // Reference of the truncated 16-bit multiplier: the columns 0..3 of the
  // partial-product array are removed and 12 = floor((3*16+1)/4) is added.
  function automatic longint mul_ref(input logic [15:0] a, input logic [15:0] b);
    longint v = longint'($signed(a)) * longint'($signed(b));
    for (int r = 0; r < 4; r++)
      for (int j = 0; j < 4 - r; j++)
        if (a[j] && b[r]) v -= longint'(1) << (r + j);
    return v + 12;
  endfunction

  // Reference of the 32-bit tunable adder with the low k bits padded.
  function automatic logic [31:0] add_ref(input longint x, input longint y,
                                          input int k, input longint pad);
    longint m = (longint'(1) << k) - 1;
    return 32'(((((x & 64'hffffffff) >> k) + ((y & 64'hffffffff) >> k)) << k) | (pad & m));
  endfunction

  int n_exact_add = 0, n_trunc_add = 0, n_mul_err = 0, n_feedback = 0, n_div_pad = 0;

  initial begin
    static logic [15:0] A [4][4];
    static logic [15:0] B [4][4];
    static logic [7:0]  f0 [8][8];
    static logic [7:0]  f1 [8][8];
    automatic longint sum_pad = 0, sum_nopad = 0;
    automatic int n_changed = 0, n_same = 0;

    // ---- 1. matrix multiplication --------------------------------------
    foreach (A[i, j]) begin A[i][j] = 16'($urandom); B[i][j] = 16'($urandom); end
    for (int mode = 0; mode < 2; mode++) begin
      automatic int k = (mode == 0) ? 0 : 8;
      mm_con = (mode == 0) ? 16'h0000 : 16'h00ff;
      mm_pad = mm_con;
      for (int i = 0; i < 4; i++) begin
        for (int j = 0; j < 4; j++) begin
          automatic logic [31:0] acc = '0;
          automatic longint exact = 0;
          for (int kk = 0; kk < 4; kk++) begin
            automatic longint pr;
            mm_a = A[i][kk]; mm_b = B[kk][j]; mm_s_in = acc;
            #1;
            pr = mul_ref(mm_a, mm_b);
            check(mm_product === 32'(pr), $sformatf("MM product (%0d,%0d,%0d)", i, j, kk));
            check(mm_s_out === add_ref(pr, longint'(acc), k, longint'(mm_pad)),
                  $sformatf("MM sum (%0d,%0d,%0d) k=%0d", i, j, kk, k));
            if (32'(pr) != 32'(longint'($signed(mm_a)) * longint'($signed(mm_b)))) n_mul_err++;
            if (k == 0) n_exact_add++; else n_trunc_add++;
            if (kk > 0) n_feedback++;
            exact += longint'($signed(mm_a)) * longint'($signed(mm_b));
            acc = mm_s_out;
          end
          if (i == 0 && j == 0)
            $display("adder k=%0d: P00 approximate=%0d exact(32-bit)=%0d", k,
                     $signed(acc), $signed(32'(exact)));
        end
      end
    end

    // ---- 2. error of one multiply-accumulate step ------------------------
    mm_con = 16'h00ff;
    mm_pad = 16'h00ff;
    for (int t = 0; t < 20000; t++) begin
      automatic longint exact, approx;
      // values kept small enough that the 32-bit sum cannot wrap
      mm_a = 16'($urandom); mm_b = 16'($urandom);
      mm_s_in = 32'($signed(16'($urandom)));
      #1;
      exact  = longint'($signed(mm_a)) * longint'($signed(mm_b)) + longint'($signed(mm_s_in));
      approx = longint'($signed(mm_s_out));
      sum_pad   += approx - exact;
      sum_nopad += approx - 255 - exact;   // same result with padding 0
    end
    $display("MAC step, adder k=8: ASE with padding %f, without %f, ratio %f",
             real'(sum_pad) / 20000.0, real'(sum_nopad) / 20000.0,
             (sum_pad < 0 ? -real'(sum_pad) : real'(sum_pad)) /
             (sum_nopad < 0 ? -real'(sum_nopad) : real'(sum_nopad)));
    check((sum_pad < 0 ? -sum_pad : sum_pad) < (sum_nopad < 0 ? -sum_nopad : sum_nopad),
          "compensation does not reduce the mean signed error");

    // ---- 3. change detection -------------------------------------------
    foreach (f0[y, x]) begin
      f0[y][x] = 8'(1 + $urandom_range(254));
      f1[y][x] = f0[y][x];
    end
    for (int y = 2; y < 5; y++)
      for (int x = 3; x < 6; x++)
        f1[y][x] = 8'(1 + $urandom_range(254));
    foreach (f0[y, x]) begin
      automatic int p = int'(f0[y][x]), s = int'(f1[y][x]);
      automatic int lo = (p < s) ? p : s;
      automatic int hi = (p < s) ? s : p;
      automatic int qx;
      // equal pixels would give a quotient of 256; they map to lo = hi - 1
      // against hi, i.e. the largest ratio below one
      if (lo == hi) lo = hi - 1;
      div_a = 16'(lo << 8);
      div_d = 8'(hi);
      #1;
      qx = (lo << 8) / hi;
      check(int'(div_q) == (((qx >> 2) << 2) | 2),
            $sformatf("pixel (%0d,%0d): q=%0d exact %0d", y, x, div_q, qx));
      if (div_q[1:0] == 2'b10 && qx[1:0] != 2'b10) n_div_pad++;
      if (f0[y][x] == f1[y][x]) n_same++; else n_changed++;
    end
    $display("change detection: %0d unchanged pixels, %0d changed", n_same, n_changed);

    $display("mechanisms: exact adder %0d, truncated adder %0d, multiplier error %0d, feedback %0d, divider padding %0d",
             n_exact_add, n_trunc_add, n_mul_err, n_feedback, n_div_pad);
    check(n_exact_add > 0, "exact adder mode never used");
    check(n_trunc_add > 0, "truncated adder mode never used");
    check(n_mul_err > 0,   "multiplier truncation never changed a product");
    check(n_feedback > 0,  "accumulation feedback never used");
    check(n_div_pad > 0,   "divider padding never changed a quotient");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
