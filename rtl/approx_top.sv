// approx_top: the two application datapaths of the output-compensation
// scheme, side by side.
//
//  * Matrix-multiplication unit (mm_pe): S_out = A * B + S_in with a
//    truncated, padded Baugh-Wooley multiplier (MM_N-bit operands, MM_K
//    truncated columns or rows) and a run-time tunable truncated adder
//    (mm_con selects which low sum bits are switched off, mm_pad supplies
//    their padding). Defaults: 16-bit operands, vertical truncation, K = 4;
//    the adder truncation of 8 bits is set by driving mm_con = 16'h00ff and
//    mm_pad = 16'h00ff.
//  * Change-detection divider (nr_trunc_divider): a 2*DIV_N-by-DIV_N
//    non-restoring array divider with the DIV_K last quotient rows removed
//    and replaced by the padding 2^(DIV_K-1). Default 16-by-8, K = 2. A
//    pixel ratio X/Y is formed by dividing (X << 8) by Y, which needs X < Y.
//
// The two datapaths share nothing. Timing: purely combinational.
module approx_top
  import approx_pkg::*;
#(
  parameter int unsigned MM_N    = 16,
  parameter int unsigned MM_K    = 4,
  parameter trunc_mode_e MM_MODE = TRUNC_VERTICAL,
  parameter int unsigned DIV_N   = 8,
  parameter int unsigned DIV_K   = 2
) (
  input  logic [MM_N-1:0]    mm_a,
  input  logic [MM_N-1:0]    mm_b,
  input  logic [2*MM_N-1:0]  mm_s_in,
  input  logic [MM_N-1:0]    mm_con,
  input  logic [MM_N-1:0]    mm_pad,
  output logic [2*MM_N-1:0]  mm_product,
  output logic [2*MM_N-1:0]  mm_s_out,
  input  logic [2*DIV_N-1:0] div_a,
  input  logic [DIV_N-1:0]   div_d,
  output logic [DIV_N-1:0]   div_q,
  output logic [DIV_N-1:0]   div_r
);
  mm_pe #(.N(MM_N), .K(MM_K), .MODE(MM_MODE)) u_mm (
    .a      (mm_a),
    .b      (mm_b),
    .s_in   (mm_s_in),
    .con    (mm_con),
    .pad    (mm_pad),
    .product(mm_product),
    .s_out  (mm_s_out)
  );

  nr_trunc_divider #(.N(DIV_N), .K(DIV_K)) u_div (
    .a(div_a),
    .d(div_d),
    .q(div_q),
    .r(div_r)
  );
endmodule
