// mm_pe_tb: self-checking test of the matrix-multiplication processing unit
// S_out = A * B + S_in.
// Two configurations: the default (16-bit, vertical truncation k = 4) and an
// 8-bit unit with horizontal truncation k = 2. For random operands and
// adder truncation levels 0, 4 and N/2 (mask of ones, padding of ones, or
// padding of zeros) the product must equal exact - removed partial
// products + padding, and the sum must equal the sum of the two operands
// with the low k bits cut off and replaced by the padding bits.
module mm_pe_tb;
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

  function automatic longint dropped(input int n, input int k, input bit horiz,
                                     input longint ua, input longint ub);
    longint v = 0;
    for (int r = 0; r < n; r++)
      for (int j = 0; j < n; j++) begin
        bit pp, gone;
        pp = ((ua >> j) & 64'd1) != 0 && ((ub >> r) & 64'd1) != 0;
        if ((r == n - 1) != (j == n - 1)) pp = !pp;
        gone = horiz ? (r < k) : (r + j < k);
        if (gone && pp) v += longint'(1) << (r + j);
      end
    if (horiz && k > 0) v += longint'(1) << n;
    return v;
  endfunction

  // Sum of the tunable adder: low k bits from the padding.
  function automatic longint tsum(input int w, input int k, input longint x,
                                  input longint y, input longint pad);
    longint m = (longint'(1) << k) - 1;
    longint full = (longint'(1) << w) - 1;
    return ((((x & full) >> k) + ((y & full) >> k)) << k | (pad & m)) & full;
  endfunction

  // Default unit: N = 16, vertical, K = 4 (padding 12)
  logic [15:0] a16, b16, con16, pad16;
  logic [31:0] s16, p16, o16;
  mm_pe u16 (.a(a16), .b(b16), .s_in(s16), .con(con16), .pad(pad16), .product(p16), .s_out(o16));

  // 8-bit unit, horizontal, K = 2 (padding 639)
  logic [7:0]  a8, b8, con8, pad8;
  logic [15:0] s8, p8, o8;
  mm_pe #(.N(8), .K(2), .MODE(TRUNC_HORIZONTAL)) u8 (
    .a(a8), .b(b8), .s_in(s8), .con(con8), .pad(pad8), .product(p8), .s_out(o8));

  initial begin
    static int klev16 [3] = '{0, 4, 16};
    static int klev8  [3] = '{0, 4, 8};
    for (int t = 0; t < 30000; t++) begin
      automatic int k16 = klev16[t % 3];
      automatic int k8  = klev8[t % 3];
      automatic longint pr16, pr8, pv16, pv8;
      a16 = 16'($urandom); b16 = 16'($urandom); s16 = $urandom;
      a8  = 8'($urandom);  b8  = 8'($urandom);  s8  = 16'($urandom);
      con16 = 16'((longint'(1) << k16) - 1);
      con8  = 8'((longint'(1) << k8) - 1);
      pv16  = (t % 2) ? longint'(con16) : 0;
      pv8   = (t % 2) ? longint'(con8)  : 0;
      pad16 = 16'(pv16); pad8 = 8'(pv8);
      #1;
      pr16 = longint'($signed(a16)) * longint'($signed(b16))
           - dropped(16, 4, 1'b0, longint'(a16), longint'(b16)) + 12;
      pr8  = longint'($signed(a8)) * longint'($signed(b8))
           - dropped(8, 2, 1'b1, longint'(a8), longint'(b8)) + 639;
      check(p16 === 32'(pr16), $sformatf("N16 product a=%h b=%h got %h want %h", a16, b16, p16, 32'(pr16)));
      check(o16 === 32'(tsum(32, k16, pr16, longint'(s16), pv16)),
            $sformatf("N16 sum k=%0d got %h", k16, o16));
      check(p8 === 16'(pr8), $sformatf("N8 product a=%h b=%h got %h want %h", a8, b8, p8, 16'(pr8)));
      check(o8 === 16'(tsum(16, k8, pr8, longint'(s8), pv8)),
            $sformatf("N8 sum k=%0d got %h", k8, o8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
