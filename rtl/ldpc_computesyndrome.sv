// ldpc_computesyndrome: syndrome of the decoded codeword candidate.
//
// Syndrome bit j is the XOR of decoded[i] AND H^T[i][j] over all bits i, the
// AND/XOR chain of Figure 3.7. One bit is computed per cycle, bit j in the j-th
// cycle of the run starting with the enable cycle, so output_ready pulses M
// cycles after enable_computesyndrome (12 cycles, as in Table 4.1; the
// one-per-cycle schedule is this design's choice). With output_ready, s holds
// the syndrome vector and syndrome = OR of its bits: 0 means the candidate
// satisfies every parity check.
module ldpc_computesyndrome
  import ldpc_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic enable_computesyndrome,
  input  logic [N-1:0] decoded_output,
  output logic [M-1:0] s,
  output logic syndrome,
  output logic output_ready
);

  localparam int KW = $clog2(M + 1);
  logic [KW-1:0] k, cur;
  logic          busy;
  wire           step = enable_computesyndrome || busy;

  assign cur      = busy ? k : '0;
  assign syndrome = |s;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      busy <= 1'b0; k <= '0; s <= '0; output_ready <= 1'b0;
    end else begin
      output_ready <= 1'b0;
      if (step) begin
        for (int j = 0; j < M; j++)
          if (cur == KW'(j)) s[j] <= ^(decoded_output & H[j]);
        if (cur == KW'(M - 1)) begin
          busy <= 1'b0; output_ready <= 1'b1;
        end else begin
          busy <= 1'b1; k <= cur + 1'b1;
        end
      end
    end
  end

endmodule
