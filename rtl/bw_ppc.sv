// bw_ppc: partial-product cell of the Baugh-Wooley array multiplier.
//
// The cell forms one partial-product bit from a multiplicand bit a and a
// multiplier bit b and adds it, with a full adder, to the sum arriving from
// the cell above (s_in) and the carry arriving from the cell to the right
// (c_in). Two kinds exist: an AND cell (NAND = 0) for ordinary partial
// products and a NAND cell (NAND = 1) for the products that involve exactly
// one sign bit, as Baugh-Wooley's signed scheme requires.
//
// Interface: a, b, s_in, c_in in; s_out, c_out out.
// Timing: purely combinational.
module bw_ppc #(
  parameter bit NAND = 1'b0      // 0: AND cell, 1: NAND cell
) (
  input  logic a,
  input  logic b,
  input  logic s_in,
  input  logic c_in,
  output logic s_out,
  output logic c_out
);
  logic pp;

  always_comb begin
    pp    = NAND ? ~(a & b) : (a & b);
    s_out = pp ^ s_in ^ c_in;
    c_out = (pp & s_in) | (pp & c_in) | (s_in & c_in);
  end
endmodule
