// ldpc_corr_term: correction term of one check-node combination step.
//
// For two message magnitudes a and b the exact log-domain combination is
// min(a, b) + delta, with delta = y(a + b) - y(|a - b|) and
// y(x) = log(1 + exp(-|x|)). This block evaluates delta (always <= 0) with the
// approximation of y selected by METHOD: none (min-sum, delta = 0), the
// eight-entry look-up table of Table 2.1, the five power-of-two linear segments
// of Table 2.2 (a decoder picks the segment, a shift gives the slope term and
// a small table the constant), or the single line 0.6 - |x|/4 (the source's
// optimum slope 0.24 rounded to 1/4). Purely combinational.
// Following the source, y is applied to |L(q)|-sized values and added to the
// min-sum result; that it enters as the difference of two y terms, one per
// pairwise combination, is this design's reading of Eq. 2.20.
module ldpc_corr_term
  import ldpc_pkg::*;
#(
  parameter cn_method_e METHOD = CN_MINSUM
) (
  input  mag_t a,
  input  mag_t b,
  output logic signed [5:0] delta
);

  logic [MAGW:0] sum, dif;

  always_comb begin
    sum   = {1'b0, a} + {1'b0, b};
    dif   = (a > b) ? {1'b0, a - b} : {1'b0, b - a};
    delta = $signed({1'b0, corr_y(METHOD, sum)}) - $signed({1'b0, corr_y(METHOD, dif)});
  end

endmodule
