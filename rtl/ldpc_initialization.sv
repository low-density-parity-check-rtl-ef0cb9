// ldpc_initialization: the q_init register matrix.
//
// When enable_initialization is high, every column j of q_init takes the vector
// pin, so q_init[i][j] = L(p_i) for all check nodes j: the messages of the first
// iteration are the a-priori LLRs (Figures 3.3 and 3.4 of the source). The
// matrix is presented on qout_init, and output_ready pulses in the cycle after
// the enable. Latency: 1 cycle. Rows are bit nodes (N), columns check nodes (M).
module ldpc_initialization
  import ldpc_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic enable_initialization,
  input  llr_t pin [N],
  output llr_t qout_init [N][M],
  output logic output_ready
);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      output_ready <= 1'b0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < M; j++) qout_init[i][j] <= '0;
    end else begin
      output_ready <= enable_initialization;
      if (enable_initialization)
        for (int i = 0; i < N; i++)
          for (int j = 0; j < M; j++) qout_init[i][j] <= pin[i];
    end
  end

endmodule
