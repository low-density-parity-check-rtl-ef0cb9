// ldpc_decodebigq: hard decision on the extrinsic LLRs.
//
// N comparators test the sign of L(Q_i): decoded_output[i] = 1 when
// L(Q_i) < 0, else 0 (Eq. 2.18). The comparators are enabled one after the
// other, bit i in the i-th cycle of the run starting with the enable cycle,
// so output_ready pulses N cycles after enable_decodebigQ (17 cycles,
// the latency of Table 4.1). The one-per-cycle schedule that produces this
// latency is this design's choice; the source gives only the latency.
// The source's prose decides L(Q_i) = 0 as a one and its Eq. 2.18 as a zero;
// the equation is followed.
module ldpc_decodebigq
  import ldpc_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic enable_decodebigQ,
  input  llr_t bigq [N],
  output logic [N-1:0] decoded_output,
  output logic output_ready
);

  localparam int KW = $clog2(N + 1);
  logic [KW-1:0] k;
  logic          busy;
  logic [KW-1:0] cur;
  wire           step = enable_decodebigQ || busy;

  assign cur = busy ? k : '0;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      busy <= 1'b0; k <= '0; decoded_output <= '0; output_ready <= 1'b0;
    end else begin
      output_ready <= 1'b0;
      if (step) begin
        for (int i = 0; i < N; i++)
          if (cur == KW'(i)) decoded_output[i] <= bigq[i] < 0;
        if (cur == KW'(N - 1)) begin
          busy <= 1'b0; output_ready <= 1'b1;
        end else begin
          busy <= 1'b1; k <= cur + 1'b1;
        end
      end
    end
  end

endmodule
