// ldpc_create_input: input register and channel look-up table.
//
// On a rising edge of inputready the N soft bits of inputwithawgn (8-bit signed,
// -128..127 standing for -3..3) are sampled into input_reg. In the following
// cycle pout carries, for every bit, the a-priori LLR L(p_i) read from the
// channel look-up table and outputready is high for that one cycle; pout then
// holds until the next codeword is sampled. Latency: 1 cycle (inputready high in
// cycle t, outputready high in cycle t+1).
//
// The table follows the source's Eq. 3.2: the soft bit is mapped back to the
// channel value X, X is quantised in 0.1 steps, and the LLR X*127/(3 sigma^2) with
// sigma^2 = 1 is stored as an 8-bit value. Quantising toward zero matches the
// worked example of the source (soft bit 100 = 2.36 uses the entry for 2.3). The
// table is a 256-entry ROM computed at elaboration by ldpc_pkg::channel_llr,
// which covers the 61 points -3.0..3.0; the rising-edge detector is this
// design's own reading of "after the decoder receives the rising edge".
module ldpc_create_input
  import ldpc_pkg::*;
(
  input  logic clk,
  input  logic reset,              // asynchronous, active high
  input  logic inputready,
  input  llr_t inputwithawgn [N],
  output llr_t pout [N],
  output logic outputready
);

  llr_t rom [256];
  always_comb
    for (int s = 0; s < 256; s++) rom[s] = channel_llr(llr_t'(s));

  llr_t input_reg [N];
  logic inputready_q;
  wire  sample = inputready && !inputready_q;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      inputready_q <= 1'b0;
      outputready  <= 1'b0;
      for (int i = 0; i < N; i++) input_reg[i] <= '0;
    end else begin
      inputready_q <= inputready;
      outputready  <= sample;
      if (sample) input_reg <= inputwithawgn;
    end
  end

  always_comb
    for (int i = 0; i < N; i++) pout[i] = rom[8'(input_reg[i])];

endmodule
