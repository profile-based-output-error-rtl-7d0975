// nr_div_cell_tb: exhaustive check of the non-restoring divider cell.
// The cell must compute x - y - bin with y = d ^ add, giving diff and bout.
module nr_div_cell_tb;
  logic x, d, add, bin, diff, bout;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  nr_div_cell dut (.x(x), .d(d), .add(add), .bin(bin), .diff(diff), .bout(bout));

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
      int y, dv;
      {bin, add, d, x} = 4'(v);
      #1;
      y  = (d != add) ? 1 : 0;
      dv = int'(x) - y - int'(bin);          // in -2..1
      checks++;
      if (diff !== dv[0] || bout !== (dv < 0)) begin
        failures++;
        $display("FAIL x=%b d=%b add=%b bin=%b -> diff=%b bout=%b", x, d, add, bin, diff, bout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
