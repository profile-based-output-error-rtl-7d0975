// nr_div_cell: cell of the non-restoring array divider.
//
// The cell is a full subtractor with an XOR on its divisor input. The row
// control add selects the operation: add = 0 subtracts the divisor bit
// (x - d - bin), add = 1 feeds ~d to the subtractor. With the row's initial
// borrow set equal to add, a row of these cells computes x - d when add = 0
// and x + d (mod 2^width) when add = 1, because x - ~d - 1 = x + d - 2^width.
// The control is passed on unchanged to the next cell of the row.
//
// Interface: x (partial remainder bit), d (divisor bit), add, bin in;
// diff, bout out.
// Timing: purely combinational.
module nr_div_cell (
  input  logic x,
  input  logic d,
  input  logic add,
  input  logic bin,
  output logic diff,
  output logic bout
);
  logic y;

  always_comb begin
    y    = d ^ add;
    diff = x ^ y ^ bin;
    bout = (~x & y) | (~x & bin) | (y & bin);
  end
endmodule
