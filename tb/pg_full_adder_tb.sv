// pg_full_adder_tb: exhaustive check of the power-gated full-adder cell.
// All 16 input combinations; with con = 0 the outputs must be the binary sum
// of a + b + cin, with con = 1 both outputs must be 0.
module pg_full_adder_tb;
  logic a, b, cin, con, sum, cout;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  pg_full_adder dut (.a(a), .b(b), .cin(cin), .con(con), .sum(sum), .cout(cout));

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
      logic [1:0] expect_v;
      {con, cin, b, a} = 4'(v);
      #1;
      expect_v = con ? 2'b00 : 2'(int'(a) + int'(b) + int'(cin));
      checks++;
      if ({cout, sum} !== expect_v) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b con=%b -> %b%b", a, b, cin, con, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
