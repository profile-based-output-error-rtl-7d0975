// nr_trunc_divider: 2N-by-N non-restoring array divider with truncated
// quotient rows and output padding.
//
// The dividend a (2N bits) and divisor d (N bits) are unsigned; the quotient
// must fit in N bits, i.e. a[2N-1:N] < d. Row i of the array (i = 0..N-1)
// shifts the (N+1)-bit partial remainder left, brings in dividend bit
// a[N-1-i], and adds or subtracts d with N+1 nr_div_cell cells: the first
// row subtracts, every later row adds when the previous partial remainder was
// negative and subtracts otherwise, which is the non-restoring rule. The
// quotient bit of a row is the inverted sign of its result, MSB first.
//
// Truncation removes the last K rows, which would produce the K least
// significant quotient bits. Their partial remainder is passed down
// unchanged and the K quotient bits are replaced by the padding 2^(K-1),
// the mean of the missing bits under uniform operands, which turns the
// average quotient error from (2^K-1)/2 into a constant -1/2. The K low
// quotient outputs are therefore constants by design.
//
// The remainder output goes through one more row of the same cells that adds
// d back when the last partial remainder is negative. With K = 0 it is the
// exact remainder; with K > 0 it is the remainder of a[2N-1:K] / d, i.e. of
// the retained rows. This correction row is this design's choice; the error
// analysis of the scheme concerns only the quotient.
//
// Timing: purely combinational.
module nr_trunc_divider
  import approx_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned K = 2
) (
  input  logic [2*N-1:0] a,
  input  logic [N-1:0]   d,
  output logic [N-1:0]   q,
  output logic [N-1:0]   r
);
  localparam int unsigned ROWS = N - K;   // rows that are built
  localparam logic [N-1:0] QPAD = N'(div_padding(K));

  // pr[i] is the (N+1)-bit signed partial remainder entering row i.
  logic [N:0] pr  [ROWS+1];
  logic       neg [ROWS+1];              // sign of pr[i]
  logic [N:0] dx;                        // divisor extended to N+1 bits

  assign dx     = {1'b0, d};
  assign pr[0]  = {1'b0, a[2*N-1:N]};
  assign neg[0] = 1'b0;                  // first row always subtracts

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    logic [N:0]   x;                     // shifted remainder with new bit
    logic [N+1:0] bw;                    // borrow chain
    logic [N:0]   res;
    assign x     = {pr[i][N-1:0], a[N-1-i]};
    assign bw[0] = neg[i];
    for (genvar j = 0; j <= N; j++) begin : g_cell
      nr_div_cell u_cell (
        .x   (x[j]),
        .d   (dx[j]),
        .add (neg[i]),
        .bin (bw[j]),
        .diff(res[j]),
        .bout(bw[j+1])
      );
    end
    assign pr[i+1]  = res;
    assign neg[i+1] = res[N];
    assign q[N-1-i] = ~res[N];
  end

  // Padding in place of the truncated quotient bits.
  if (K > 0) begin : g_pad
    assign q[K-1:0] = QPAD[K-1:0];
  end

  // Remainder correction: add d back if the final remainder is negative.
  logic [N:0]   rc;
  logic [N+1:0] rbw;
  logic [N:0]   dcor;
  assign dcor   = neg[ROWS] ? dx : '0;
  assign rbw[0] = 1'b1;                  // add mode: x - ~dcor - 1 = x + dcor
  for (genvar j = 0; j <= N; j++) begin : g_corr
    nr_div_cell u_cell (
      .x   (pr[ROWS][j]),
      .d   (dcor[j]),
      .add (1'b1),
      .bin (rbw[j]),
      .diff(rc[j]),
      .bout(rbw[j+1])
    );
  end
  assign r = rc[N-1:0];
endmodule
