// bw_trunc_multiplier_tb: self-checking test of the truncated Baugh-Wooley
// multiplier.
//  * 8-bit, exhaustive over all 65536 operand pairs, for the exact array and
//    for vertical (V) and horizontal (H) truncation with k = 1..4. Each
//    product is compared bit for bit with a reference built from the signed
//    product: exact - (value of the removed partial products) + padding.
//    The paddings are the published ones: V 0, 1, 4, 12 and
//    H 383, 639, 1150, 2172.
//  * The exhaustive mean signed error is compared with the analysis:
//    V without padding -0.25, -1.25, -4.25, -12.25 and with padding -0.25;
//    H without padding -383.75, -639.25, -1150.25, -2172.25 and with padding
//    -0.75, -0.25, -0.25, -0.25.
//  * 16-bit, random operands, V and H with k = 4 and k = 8, bit for bit.
module bw_trunc_multiplier_tb;
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

  // Value of the partial products a multiplier of width n drops at
  // truncation k, including the 2^n constant for horizontal truncation.
  function automatic longint dropped(input int n, input int k, input bit horiz,
                                     input longint ua, input longint ub);
    longint v = 0;
    for (int r = 0; r < n; r++)
      for (int j = 0; j < n; j++) begin
        bit pp, gone;
        pp = ((ua >> j) & 1) && ((ub >> r) & 1);
        if ((r == n - 1) != (j == n - 1)) pp = !pp;
        gone = horiz ? (r < k) : (r + j < k);
        if (gone && pp) v += longint'(1) << (r + j);
      end
    if (horiz && k > 0) v += longint'(1) << n;
    return v;
  endfunction

  // ---- 8-bit instances ------------------------------------------------------
  logic [7:0]  a8, b8;
  logic [15:0] p8 [9];   // 0: exact, 1..4: V k, 5..8: H k-4

  bw_trunc_multiplier #(.N(8), .K(0), .MODE(TRUNC_VERTICAL)) u_exact (.a(a8), .b(b8), .p(p8[0]));
  for (genvar k = 1; k <= 4; k++) begin : g8
    bw_trunc_multiplier #(.N(8), .K(k), .MODE(TRUNC_VERTICAL))   u_v (.a(a8), .b(b8), .p(p8[k]));
    bw_trunc_multiplier #(.N(8), .K(k), .MODE(TRUNC_HORIZONTAL)) u_h (.a(a8), .b(b8), .p(p8[k+4]));
  end

  // ---- 16-bit instances -----------------------------------------------------
  logic [15:0] a16, b16;
  logic [31:0] p16 [4];  // V4, V8, H4, H8
  bw_trunc_multiplier #(.N(16), .K(4), .MODE(TRUNC_VERTICAL))   u_v4 (.a(a16), .b(b16), .p(p16[0]));
  bw_trunc_multiplier #(.N(16), .K(8), .MODE(TRUNC_VERTICAL))   u_v8 (.a(a16), .b(b16), .p(p16[1]));
  bw_trunc_multiplier #(.N(16), .K(4), .MODE(TRUNC_HORIZONTAL)) u_h4 (.a(a16), .b(b16), .p(p16[2]));
  bw_trunc_multiplier #(.N(16), .K(8), .MODE(TRUNC_HORIZONTAL)) u_h8 (.a(a16), .b(b16), .p(p16[3]));

  initial begin
    static longint pad8 [9]  = '{0, 0, 1, 4, 12, 383, 639, 1150, 2172};
    // sum of signed errors over all 65536 pairs, times 4
    static longint ase_nopad4 [9] = '{0, -1, -5, -17, -49, -1535, -2557, -4601, -8689};
    static longint ase_pad4   [9] = '{0, -1, -1, -1, -1, -3, -1, -1, -1};
    longint err_sum [9];
    int     mism [9];
    // 16-bit paddings: V: ((k-1)2^k+1)/4, H: (2^17-1)(2^k-1)/4 + 2^16
    static longint pad16 [4] = '{12, 448, 557052, 8421312};
    static int     k16   [4] = '{4, 8, 4, 8};
    static bit     h16   [4] = '{0, 0, 1, 1};

    foreach (err_sum[i]) begin err_sum[i] = 0; mism[i] = 0; end

    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        longint exact;
        a8 = 8'(ia); b8 = 8'(ib);
        #1;
        exact = longint'($signed(a8)) * longint'($signed(b8));
        for (int c = 0; c < 9; c++) begin
          int k;
          bit h;
          longint ref_v, got;
          h = (c > 4);
          k = h ? c - 4 : c;
          ref_v = exact - dropped(8, k, h, ia, ib) + pad8[c];
          got   = longint'($signed(p8[c]));
          if (16'(ref_v) !== p8[c]) mism[c]++;
          err_sum[c] += got - exact;
        end
      end
    end

    for (int c = 0; c < 9; c++) begin
      string name;
      name = (c == 0) ? "exact" : $sformatf("%s k=%0d", (c > 4) ? "H" : "V", (c > 4) ? c - 4 : c);
      check(mism[c] == 0, $sformatf("%s: %0d products differ from reference", name, mism[c]));
      check(err_sum[c] * 4 == ase_pad4[c] * 65536,
            $sformatf("%s: padded ASE %f", name, real'(err_sum[c]) / 65536.0));
      check((err_sum[c] - pad8[c] * 65536) * 4 == ase_nopad4[c] * 65536,
            $sformatf("%s: unpadded ASE %f", name, real'(err_sum[c] - pad8[c] * 65536) / 65536.0));
      $display("%-8s padding=%0d ASE without=%f with=%f", name, pad8[c],
               real'(err_sum[c] - pad8[c] * 65536) / 65536.0, real'(err_sum[c]) / 65536.0);
    end

    for (int t = 0; t < 20000; t++) begin
      longint exact;
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      if (t == 0) begin a16 = 16'h8000; b16 = 16'h8000; end
      if (t == 1) begin a16 = 16'h7fff; b16 = 16'h8000; end
      #1;
      exact = longint'($signed(a16)) * longint'($signed(b16));
      for (int c = 0; c < 4; c++) begin
        longint ref_v;
        ref_v = exact - dropped(16, k16[c], h16[c], longint'(a16), longint'(b16)) + pad16[c];
        check(32'(ref_v) === p16[c],
              $sformatf("16-bit cfg %0d a=%h b=%h got %h want %h", c, a16, b16, p16[c], 32'(ref_v)));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
