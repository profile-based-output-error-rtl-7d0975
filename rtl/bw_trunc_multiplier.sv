// bw_trunc_multiplier: N x N signed Baugh-Wooley array multiplier with
// input truncation and output padding.
//
// The array has one row of N partial-product cells (bw_ppc) per multiplier
// bit b[r]. Row r adds a[N-1:0] & b[r], shifted left by r, to the sum built
// by the rows above: each cell takes its sum input from above and its carry
// from the cell to its right, and the carry out of the row's leftmost cell
// becomes bit r+N of the running sum. Cells with exactly one sign-bit operand
// are NAND cells. The Baugh-Wooley correction constant 2^N + 2^(2N-1) turns
// the array's unsigned total into the two's-complement product.
//
// Truncation removes cells: with MODE = TRUNC_VERTICAL the cells of the K
// least significant product columns (r + j < K) are left out; with
// MODE = TRUNC_HORIZONTAL the K least significant rows (r < K) and the 2^N
// constant are left out. A removed cell passes its sum input straight down
// and produces no carry. The compensation stage then adds the constant
// PAD (plus the Baugh-Wooley constant still owed) to the array's output.
// PAD defaults to the mean value of what was removed under uniform
// operands (see approx_pkg), which makes the average signed error of the
// product close to zero.
//
// The compensation stage is a single adder after the array; where the scheme
// places the padding bits is not fixed beyond "added at the output", and a
// vertical padding can be wider than K bits (K = 8, N = 16 gives 448), so it
// is added rather than concatenated. This adder is this design's choice.
//
// Interface: a, b signed N-bit operands; p the 2N-bit approximate product.
// Timing: purely combinational.
module bw_trunc_multiplier
  import approx_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned K    = 2,
  parameter trunc_mode_e MODE = TRUNC_VERTICAL,
  parameter logic [2*N-1:0] PAD =
      (K == 0) ? '0 :
      (MODE == TRUNC_VERTICAL) ? (2*N)'(mul_vert_padding(K))
                               : (2*N)'(mul_horiz_padding(N, K))
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned W = 2 * N;

  // Baugh-Wooley constant still added after truncation.
  localparam logic [W-1:0] BW_CONST =
      (MODE == TRUNC_HORIZONTAL && K > 0) ? (W'(1) << (W - 1))
                                          : ((W'(1) << N) | (W'(1) << (W - 1)));
  localparam logic [W-1:0] COMP = BW_CONST + PAD;

  // acc[r] is the running sum entering row r.
  logic [W-1:0] acc [N+1];
  assign acc[0] = '0;

  for (genvar r = 0; r < N; r++) begin : g_row
    logic [N:0] c;           // ripple carry inside the row
    logic [W-1:0] nxt;
    assign c[0] = 1'b0;
    for (genvar j = 0; j < N; j++) begin : g_col
      localparam bit IS_NAND = ((r == N - 1) != (j == N - 1));
      localparam bit REMOVED =
          (MODE == TRUNC_VERTICAL)   ? ((r + j) < K) :
                                       (r < K);
      if (REMOVED) begin : g_cut
        assign nxt[r+j] = acc[r][r+j];
        assign c[j+1]   = 1'b0;
      end else begin : g_cell
        bw_ppc #(.NAND(IS_NAND)) u_ppc (
          .a    (a[j]),
          .b    (b[r]),
          .s_in (acc[r][r+j]),
          .c_in (c[j]),
          .s_out(nxt[r+j]),
          .c_out(c[j+1])
        );
      end
    end
    // Bits below the row are final; the row's carry out is bit r+N.
    if (r > 0) begin : g_low
      assign nxt[r-1:0] = acc[r][r-1:0];
    end
    assign nxt[r+N] = c[N];
    if (r + N + 1 < W) begin : g_high
      assign nxt[W-1:r+N+1] = acc[r][W-1:r+N+1];
    end
    assign acc[r+1] = nxt;
  end

  // Output compensation: Baugh-Wooley constant plus padding.
  assign p = acc[N] + COMP;
endmodule
