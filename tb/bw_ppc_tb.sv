// bw_ppc_tb: exhaustive check of the AND and NAND partial-product cells.
// For every a, b, s_in, c_in the cell must output the two-bit sum of the
// partial product (a&b, or its complement for the NAND cell), s_in and c_in.
module bw_ppc_tb;
  logic a, b, s_in, c_in;
  logic s_and, c_and, s_nand, c_nand;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  bw_ppc #(.NAND(1'b0)) u_and  (.a(a), .b(b), .s_in(s_in), .c_in(c_in), .s_out(s_and),  .c_out(c_and));
  bw_ppc #(.NAND(1'b1)) u_nand (.a(a), .b(b), .s_in(s_in), .c_in(c_in), .s_out(s_nand), .c_out(c_nand));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int pp;
      {c_in, s_in, b, a} = 4'(v);
      #1;
      pp = (a && b) ? 1 : 0;
      checks++;
      if ({c_and, s_and} !== 2'(pp + int'(s_in) + int'(c_in))) begin
        failures++;
        $display("FAIL AND cell v=%0d", v);
      end
      checks++;
      if ({c_nand, s_nand} !== 2'((1 - pp) + int'(s_in) + int'(c_in))) begin
        failures++;
        $display("FAIL NAND cell v=%0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
