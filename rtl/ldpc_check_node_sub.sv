// ldpc_check_node_sub: one check node sub-module, computing L(r_ji).
//
// The messages L(q_i'j) of the check node's row arrive one per cycle on q_in
// with q_valid; include is high for the ones that belong to the result (H has a
// one at i' and i' differs from this sub-module's own bit i). The sub-module
// keeps the XOR of the signs (Figure 3.8) and a running magnitude: the first
// included input sets it to |L(q)|, every later one combines it as
// min(acc, |L(q)|) + delta (Figure 3.9, plus ldpc_corr_term; delta = 0 for
// min-sum), i.e. the pairwise formula of Eq. 2.20 applied input after input.
// clear (the run's start) resets both; out_en loads r_out = sign * magnitude.
// A sub-module that saw no input (inactive position) outputs 0.
module ldpc_check_node_sub
  import ldpc_pkg::*;
#(
  parameter cn_method_e METHOD = CN_MINSUM
) (
  input  logic clk,
  input  logic reset,
  input  logic clear,
  input  logic q_valid,
  input  logic incl,
  input  llr_t q_in,
  input  logic out_en,
  output llr_t r_out
);

  logic sgn, seen;
  mag_t mag, qmag, mn;
  logic signed [5:0] delta;
  logic signed [MAGW+1:0] comb;

  assign qmag = abs_llr(q_in);
  assign mn   = (mag < qmag) ? mag : qmag;

  ldpc_corr_term #(.METHOD(METHOD)) u_corr (.a(mag), .b(qmag), .delta(delta));

  assign comb = $signed({2'b00, mn}) + (MAGW+2)'(delta);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      sgn <= 1'b0; seen <= 1'b0; mag <= '0; r_out <= '0;
    end else begin
      if (clear) begin
        sgn <= 1'b0; seen <= 1'b0; mag <= '0;
      end else if (q_valid && incl) begin
        sgn  <= sgn ^ q_in[W-1];
        seen <= 1'b1;
        mag  <= !seen ? qmag : (comb < 0) ? '0 : mag_t'(comb);
      end
      if (out_en)
        r_out <= !seen ? '0 : sgn ? -llr_t'({1'b0, mag}) : llr_t'({1'b0, mag});
    end
  end

endmodule
