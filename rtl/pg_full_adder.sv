// pg_full_adder: full-adder cell with a power-gating control.
//
// In the tunable truncated adder every low-order cell carries a gating
// control CON. With CON low the cell is an ordinary full adder. With CON high
// the power-gating transistors force the cell's gate outputs to zero, so the
// cell stops switching and its sum and carry outputs are both 0. The
// transistor-level gating (series PMOS in the pull-up network, parallel NMOS
// on the pull-down network) is represented here only by its logic effect,
// which is all that matters at the ports: outputs forced to 0.
//
// Interface: a, b, cin in; sum, cout out; con = 1 disables the cell.
// Timing: purely combinational.
module pg_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic con,
  output logic sum,
  output logic cout
);
  always_comb begin
    if (con) begin
      sum  = 1'b0;
      cout = 1'b0;
    end else begin
      sum  = a ^ b ^ cin;
      cout = (a & b) | (a & cin) | (b & cin);
    end
  end
endmodule
