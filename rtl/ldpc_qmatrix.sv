// ldpc_qmatrix: source selector for the bit-to-check message matrix.
//
// The check nodes read their L(q) inputs from qout. In the first iteration of a
// codeword these are the initial messages of the initialization block; in later
// iterations they are the messages computed by allbitnodes. A one-bit select
// register remembers which source was enabled last: enable_initialization
// selects qout_init, enable_allbitnodes selects qout_bitmatrix. Both sources
// are registers, so qout is a plain multiplexer after the select flop.
// The two enables as inputs come from the source's top-level diagram; the
// select flop (and so the clock and reset ports) is this design's choice.
module ldpc_qmatrix
  import ldpc_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic enable_initialization,
  input  logic enable_allbitnodes,
  input  llr_t qout_init      [N][M],
  input  llr_t qout_bitmatrix [N][M],
  output llr_t qout           [N][M]
);

  logic use_bitmatrix;

  always_ff @(posedge clk or posedge reset) begin
    if (reset)                      use_bitmatrix <= 1'b0;
    else if (enable_initialization) use_bitmatrix <= 1'b0;
    else if (enable_allbitnodes)    use_bitmatrix <= 1'b1;
  end

  assign qout = use_bitmatrix ? qout_bitmatrix : qout_init;

endmodule
