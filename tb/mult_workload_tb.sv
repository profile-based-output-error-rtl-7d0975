// mult_workload_tb: random-operand error statistics of the truncated
// multiplier configurations compared in the multiplier evaluation:
// 8-bit with K = 2 and 4, 16-bit with K = 4 and 8, vertical and horizontal,
// 1,000,000 uniformly distributed operand pairs each.
// For every configuration the mean signed error (approximate - exact), its
// standard error and the normalised mean error distance (mean |error| / 2^(2N-2))
// are printed. The check: the mean signed error must lie within five
// standard errors of its analytic value, which is minus the fractional part
// of the mean removed value (-0.25 for every configuration here).
module mult_workload_tb;
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

  logic [7:0]  a8, b8;
  logic [15:0] a16, b16;
  logic [15:0] p8  [4];   // V2, H2, V4, H4
  logic [31:0] p16 [4];   // V4, H4, V8, H8

  bw_trunc_multiplier #(.N(8),  .K(2), .MODE(TRUNC_VERTICAL))   u0 (.a(a8),  .b(b8),  .p(p8[0]));
  bw_trunc_multiplier #(.N(8),  .K(2), .MODE(TRUNC_HORIZONTAL)) u1 (.a(a8),  .b(b8),  .p(p8[1]));
  bw_trunc_multiplier #(.N(8),  .K(4), .MODE(TRUNC_VERTICAL))   u2 (.a(a8),  .b(b8),  .p(p8[2]));
  bw_trunc_multiplier #(.N(8),  .K(4), .MODE(TRUNC_HORIZONTAL)) u3 (.a(a8),  .b(b8),  .p(p8[3]));
  bw_trunc_multiplier #(.N(16), .K(4), .MODE(TRUNC_VERTICAL))   u4 (.a(a16), .b(b16), .p(p16[0]));
  bw_trunc_multiplier #(.N(16), .K(4), .MODE(TRUNC_HORIZONTAL)) u5 (.a(a16), .b(b16), .p(p16[1]));
  bw_trunc_multiplier #(.N(16), .K(8), .MODE(TRUNC_VERTICAL))   u6 (.a(a16), .b(b16), .p(p16[2]));
  bw_trunc_multiplier #(.N(16), .K(8), .MODE(TRUNC_HORIZONTAL)) u7 (.a(a16), .b(b16), .p(p16[3]));

  real sum_e [8], sum_e2 [8], sum_abs [8];

  initial begin
    static string name [8] = '{"N=8 k=2 V", "N=8 k=2 H", "N=8 k=4 V", "N=8 k=4 H",
                               "N=16 k=4 V", "N=16 k=4 H", "N=16 k=8 V", "N=16 k=8 H"};
    foreach (sum_e[c]) begin sum_e[c] = 0.0; sum_e2[c] = 0.0; sum_abs[c] = 0.0; end
    for (int t = 0; t < SAMPLES; t++) begin
      automatic longint e8, e16;
      a8 = 8'($urandom); b8 = 8'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom);
      #1;
      e8  = longint'($signed(a8))  * longint'($signed(b8));
      e16 = longint'($signed(a16)) * longint'($signed(b16));
      for (int c = 0; c < 8; c++) begin
        automatic real err;
        err = (c < 4) ? real'(longint'($signed(p8[c])) - e8)
                      : real'(longint'($signed(p16[c-4])) - e16);
        sum_e[c]   += err;
        sum_e2[c]  += err * err;
        sum_abs[c] += (err < 0.0) ? -err : err;
      end
    end
    for (int c = 0; c < 8; c++) begin
      automatic real mean = sum_e[c] / SAMPLES;
      automatic real sd   = $sqrt(sum_e2[c] / SAMPLES - mean * mean);
      automatic real se   = sd / $sqrt(real'(SAMPLES));
      automatic real maxp = (c < 4) ? 16384.0 : 1073741824.0;
      $display("%-11s ASE %10.3f  (std. error %8.3f)  NMED %8.2e", name[c], mean, se,
               sum_abs[c] / SAMPLES / maxp);
      checks++;
      if (mean + 0.25 > 5.0 * se + 0.01 || mean + 0.25 < -5.0 * se - 0.01) begin
        failures++;
        $display("FAIL %s: mean signed error %f, expected -0.25", name[c], mean);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
