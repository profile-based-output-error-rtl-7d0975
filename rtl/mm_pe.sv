// mm_pe: approximate processing unit for matrix multiplication,
// S_out = A * B + S_in.
//
// One step of the cumulative sum P_ij = sum_k A_ik * B_kj. The product comes
// from a truncated Baugh-Wooley multiplier with output padding
// (bw_trunc_multiplier, N-bit signed operands, K truncated columns or rows)
// and is added to the running sum by the tunable truncated adder
// (tunable_trunc_adder, 2N bits, up to N low bits switchable to padding by
// con/pad). The default configuration, 16-bit operands, a vertically
// truncated multiplier with K = 4 and the adder truncated by 8 bits (set by
// con), is one of those evaluated for the matrix-multiplication unit.
//
// The running sum is 2N bits wide so that the output can be fed back as the
// next S_in; the adder's extra sign bit is dropped, so an accumulation that
// leaves the 2N-bit range wraps. Feeding S_out back and the 2N-bit width are
// this design's choices.
//
// Timing: purely combinational (multiplier then adder).
module mm_pe
  import approx_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter int unsigned K    = 4,
  parameter trunc_mode_e MODE = TRUNC_VERTICAL
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [2*N-1:0] s_in,
  input  logic [N-1:0]   con,      // adder cells switched off (1 = truncated)
  input  logic [N-1:0]   pad,      // adder padding bits
  output logic [2*N-1:0] product,  // approximate A * B
  output logic [2*N-1:0] s_out
);
  logic [2*N:0] sum_full;

  bw_trunc_multiplier #(.N(N), .K(K), .MODE(MODE)) u_mul (
    .a(a),
    .b(b),
    .p(product)
  );

  tunable_trunc_adder #(.N(2*N)) u_add (
    .a  (product),
    .b  (s_in),
    .con(con),
    .pad(pad),
    .sum(sum_full)
  );

  assign s_out = sum_full[2*N-1:0];
endmodule
