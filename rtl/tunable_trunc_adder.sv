// tunable_trunc_adder: N-bit signed ripple-carry adder whose low half can be
// truncated at run time and replaced by an output padding.
//
// Bit i of the result comes from full-adder cell i. Each of the N/2 low cells
// is a power-gated cell (pg_full_adder) with its own control con[i] and a
// multiplexer behind it. con[i] = 0 selects the cell's sum; con[i] = 1 turns
// the cell off (sum and carry out both 0) and selects padding bit pad[i]
// instead. With the usual setting con = {k{1'b1}} and pad = {k{1'b1}} the k
// low result bits are replaced by 2^k - 1, the mean of the dropped sum of
// two uniform k-bit fields, which cancels the average error of truncation.
// The upper N/2 cells are always on: truncation is limited to half the
// width, as in the scheme. A carry into the first live cell is 0, because a
// gated cell produces no carry.
//
// The result is N+1 bits, sign-extended (bit N = a[N-1] ^ b[N-1] ^ carry
// out), so it never wraps. That extra bit and the free choice of the
// padding per bit (pad is an input, not hard-wired to ones, so a profiled
// value other than all-ones can be used) are this design's choices.
//
// Timing: purely combinational, one ripple chain.
module tunable_trunc_adder #(
  parameter int unsigned N = 8   // operand width; N/2 cells are tunable
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [N/2-1:0] con,    // 1 = cell i truncated (power gated)
  input  logic [N/2-1:0] pad,    // padding bit used where con[i] = 1
  output logic [N:0]     sum     // signed, sign-extended result
);
  localparam int unsigned L = N / 2;

  logic [N:0]   c;      // c[i] = carry into cell i
  logic [N-1:0] s_fa;   // sum output of each cell

  assign c[0] = 1'b0;

  for (genvar i = 0; i < N; i++) begin : g_cell
    if (i < L) begin : g_tunable
      pg_full_adder u_fa (
        .a   (a[i]),
        .b   (b[i]),
        .cin (c[i]),
        .con (con[i]),
        .sum (s_fa[i]),
        .cout(c[i+1])
      );
      // Output multiplexer: padding where the cell is switched off.
      assign sum[i] = con[i] ? pad[i] : s_fa[i];
    end else begin : g_fixed
      pg_full_adder u_fa (
        .a   (a[i]),
        .b   (b[i]),
        .cin (c[i]),
        .con (1'b0),
        .sum (s_fa[i]),
        .cout(c[i+1])
      );
      assign sum[i] = s_fa[i];
    end
  end

  // Sign extension of the two's-complement result.
  assign sum[N] = a[N-1] ^ b[N-1] ^ c[N];
endmodule
