// mm_workload_tb: error statistics of the matrix-multiplication unit
// S_out = A * B + S_in for the multiplier configurations compared for it
// (16-bit, K = 4 and 8, vertical and horizontal) with the adder truncated by
// 8 bits, and of the default unit at adder truncation levels 2, 4, 8 and 16.
// A, B and S_in are uniformly distributed 16-bit signed values, 1,000,000
// steps. For each case the mean signed error with the padding, the same
// without any padding (adder padding 0 and multiplier padding removed), and
// their ratio |with| / |without| are printed. The check: the ratio is below 1
// in every case, i.e. compensation always reduces the mean signed error.
module mm_workload_tb;
  import approx_pkg::*;

  localparam int SAMPLES = 1000000;

  logic clk = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (10000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] a, b;
  logic [31:0] s_in;
  logic [15:0] con8, pad8;
  logic [15:0] con_v [4];
  logic [31:0] prod [8], s_out [8];

  // 0..3: multiplier variants with the adder truncated by 8
  mm_pe #(.N(16), .K(4), .MODE(TRUNC_VERTICAL))   u0 (.a(a), .b(b), .s_in(s_in), .con(con8), .pad(pad8), .product(prod[0]), .s_out(s_out[0]));
  mm_pe #(.N(16), .K(4), .MODE(TRUNC_HORIZONTAL)) u1 (.a(a), .b(b), .s_in(s_in), .con(con8), .pad(pad8), .product(prod[1]), .s_out(s_out[1]));
  mm_pe #(.N(16), .K(8), .MODE(TRUNC_VERTICAL))   u2 (.a(a), .b(b), .s_in(s_in), .con(con8), .pad(pad8), .product(prod[2]), .s_out(s_out[2]));
  mm_pe #(.N(16), .K(8), .MODE(TRUNC_HORIZONTAL)) u3 (.a(a), .b(b), .s_in(s_in), .con(con8), .pad(pad8), .product(prod[3]), .s_out(s_out[3]));
  // 4..7: default unit, adder truncated by 2, 4, 8, 16
  for (genvar c = 0; c < 4; c++) begin : g_lvl
    mm_pe u (.a(a), .b(b), .s_in(s_in), .con(con_v[c]), .pad(con_v[c]), .product(prod[4+c]), .s_out(s_out[4+c]));
  end

  real sum_pad [8], sum_nopad [8];

  initial begin
    static string name [8] = '{"mult k=4 V, adder 8", "mult k=4 H, adder 8",
                               "mult k=8 V, adder 8", "mult k=8 H, adder 8",
                               "mult k=4 V, adder 2", "mult k=4 V, adder 4",
                               "mult k=4 V, adder 8", "mult k=4 V, adder 16"};
    // multiplier paddings and adder truncation levels of the 8 cases
    static longint mpad [8] = '{12, 557052, 448, 8421312, 12, 12, 12, 12};
    static int     alvl [8] = '{8, 8, 8, 8, 2, 4, 8, 16};
    con8 = 16'h00ff; pad8 = 16'h00ff;
    con_v[0] = 16'h0003; con_v[1] = 16'h000f; con_v[2] = 16'h00ff; con_v[3] = 16'hffff;
    foreach (sum_pad[c]) begin sum_pad[c] = 0.0; sum_nopad[c] = 0.0; end
    for (int t = 0; t < SAMPLES; t++) begin
      automatic longint exact;
      a = 16'($urandom); b = 16'($urandom);
      s_in = 32'($signed(16'($urandom)));
      #1;
      exact = longint'($signed(a)) * longint'($signed(b)) + longint'($signed(s_in));
      for (int c = 0; c < 8; c++) begin
        automatic longint p_np;
        automatic logic [31:0] s_np;
        sum_pad[c]   += real'(longint'($signed(s_out[c])) - exact);
        // the same step with no padding anywhere: product without the
        // multiplier padding, adder low bits 0
        p_np = (longint'(prod[c]) - mpad[c]) & 64'hffffffff;
        s_np = 32'(((p_np >> alvl[c]) + (longint'(s_in) >> alvl[c])) << alvl[c]);
        sum_nopad[c] += real'(longint'($signed(s_np)) - exact);
      end
    end
    for (int c = 0; c < 8; c++) begin
      automatic real wp = sum_pad[c] / SAMPLES, np = sum_nopad[c] / SAMPLES;
      automatic real ratio = (wp < 0.0 ? -wp : wp) / (np < 0.0 ? -np : np);
      $display("%-21s ASE with padding %12.3f, without %14.3f, ratio %6.4f", name[c], wp, np, ratio);
      checks++;
      if (!(ratio < 1.0)) begin
        failures++;
        $display("FAIL %s: compensation does not reduce the mean signed error", name[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
