// ldpc_controller: sequencing of one decoding and of its iterations.
//
// Every module but create_input is started by an enable pulse from here, and
// each answers with an output_ready pulse. The controller passes a ready on as
// the next module's enable in the same cycle: create_input -> initialization
// -> allchecknodes -> allbitnodes and computebigQ (together) -> decodebigQ
// (once both have finished) -> computesyndrome. On the syndrome's ready it
// decides, in one registered step: when the syndrome is zero or MAX_ITER
// iterations are done, decoder_output takes the decoded candidate and
// outputready rises; otherwise the next iteration starts with allchecknodes in
// the following cycle. outputready stays high until the next codeword is
// initialised. iterations reports the count of the last (or current) decoding.
// The same-cycle hand-over and the level-type outputready are this design's
// choices; the source gives the order of the modules and the one-cycle
// decision step. A new codeword must not be presented while a decoding runs
// (checked by an assertion).
module ldpc_controller
  import ldpc_pkg::*;
#(
  parameter int MAX_ITER = ldpc_pkg::MAX_ITER_DEFAULT
) (
  input  logic clk,
  input  logic reset,
  input  logic outputready_createinp,
  input  logic outputready_initialization,
  input  logic outputready_allchecknodes,
  input  logic outputready_allbitnodes,
  input  logic outputready_computebigQ,
  input  logic outputready_decodebigQ,
  input  logic outputready_computesyndrome,
  input  logic syndrome,
  input  logic [N-1:0] decoded_candidate,
  output logic enable_initialization,
  output logic enable_allchecknodes,
  output logic enable_allbitnodes,
  output logic enable_computebigQ,
  output logic enable_decodebigQ,
  output logic enable_computesyndrome,
  output logic [N-1:0] decoder_output,
  output logic outputready,
  output logic [$clog2(MAX_ITER+1)-1:0] iterations,
  output logic busy
);

  logic again_q;          // start another iteration
  logic wait_bq;          // allbitnodes / computebigQ running
  logic bn_done, q_done;  // seen their ready
  logic bn_now, q_now;

  assign enable_initialization  = outputready_createinp;
  assign enable_allchecknodes   = outputready_initialization || again_q;
  assign enable_allbitnodes     = outputready_allchecknodes;
  assign enable_computebigQ     = outputready_allchecknodes;
  assign bn_now                 = bn_done || outputready_allbitnodes;
  assign q_now                  = q_done  || outputready_computebigQ;
  assign enable_decodebigQ      = wait_bq && bn_now && q_now;
  assign enable_computesyndrome = outputready_decodebigQ;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      again_q <= 1'b0; wait_bq <= 1'b0; bn_done <= 1'b0; q_done <= 1'b0;
      iterations <= '0; decoder_output <= '0; outputready <= 1'b0; busy <= 1'b0;
    end else begin
      again_q <= 1'b0;
      if (enable_initialization) begin
        busy <= 1'b1; outputready <= 1'b0; iterations <= '0;
      end
      if (enable_allbitnodes) begin
        wait_bq <= 1'b1; bn_done <= 1'b0; q_done <= 1'b0;
      end else if (enable_decodebigQ) begin
        wait_bq <= 1'b0; bn_done <= 1'b0; q_done <= 1'b0;
      end else begin
        if (outputready_allbitnodes) bn_done <= 1'b1;
        if (outputready_computebigQ) q_done  <= 1'b1;
      end
      if (outputready_computesyndrome) begin
        iterations <= iterations + 1'b1;
        if (!syndrome || (iterations + 1'b1) >= ($bits(iterations))'(MAX_ITER)) begin
          decoder_output <= decoded_candidate;
          outputready    <= 1'b1;
          busy           <= 1'b0;
        end else begin
          again_q <= 1'b1;
        end
      end
    end
  end

  a_no_overlap: assert property (@(posedge clk) disable iff (reset)
    outputready_createinp |-> !busy)
    else $error("new codeword presented while decoding");

endmodule
