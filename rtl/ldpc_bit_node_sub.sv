// ldpc_bit_node_sub: one bit node sub-module, computing L(q_ij) (or L(Q_i)).
//
// The L(r_j'i) messages of the bit's column arrive one per cycle on r_in with
// r_valid; include marks those that enter the sum (H has a one at j' and, for a
// bit node message, j' differs from this sub-module's check j). clear loads the
// accumulator with the a-priori LLR L(p_i); each included message is added
// (the adder chain of Figure 3.10 unrolled in time). out_en loads the result,
// saturated to [-127, 127], into q_out. The accumulator is four bits wider than
// a message, so it cannot overflow before the final saturation; saturation
// itself is this design's choice, the source does not state how overflow is
// handled. With FAST = 1 the output register takes the sum including the
// message of the same cycle, which saves one cycle (used by computebigQ).
module ldpc_bit_node_sub
  import ldpc_pkg::*;
#(
  parameter bit FAST = 1'b0
) (
  input  logic clk,
  input  logic reset,
  input  logic clear,
  input  llr_t p_in,
  input  logic r_valid,
  input  logic incl,
  input  llr_t r_in,
  input  logic out_en,
  output llr_t q_out
);

  logic signed [W+3:0] acc, acc_next;

  always_comb begin
    acc_next = acc;
    if (r_valid && incl) acc_next = acc + (W+4)'(r_in);
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      acc <= '0; q_out <= '0;
    end else begin
      if (clear) acc <= (W+4)'(p_in);
      else       acc <= acc_next;
      if (out_en) q_out <= sat_llr(FAST ? acc_next : acc);
    end
  end

endmodule
