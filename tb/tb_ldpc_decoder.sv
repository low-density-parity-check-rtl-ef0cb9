// tb_ldpc_decoder: end-to-end test of the decoder at its default parameters
// (parallel architecture, min-sum check nodes, 20 iterations).
//
// Codewords are generated from H, sent as BPSK with Gaussian noise of several
// strengths (noiseless, light, heavy) plus words of pure noise, and each
// decoding is compared with the reference model: decoded word, and latency
// from inputready to outputready, which must be 2 + 65 * iterations cycles
// (67 for one iteration, Table 4.1). For noiseless and lightly noisy words the
// output must also equal the transmitted codeword. Counts are kept of
// decodings that stopped after one iteration, after several, at the
// iteration limit, and of those with saturated bit-node sums; each must occur.
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int NWORDS = 120;

  logic clk = 1'b0, reset = 1'b1, inputready = 1'b0;
  llr_t inputwithawgn [N];
  logic [N-1:0] decoder_output;
  logic outputready;

  ldpc_decoder dut (.clk, .reset, .inputready, .inputwithawgn, .decoder_output, .outputready);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_one = 0, n_multi = 0, n_limit = 0, n_sat = 0, n_correct = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_word(int sw [N], logic [N-1:0] sent, bit expect_sent);
    ref_result_t exp;
    longint t0, lat;
    exp = ref_decode(sw, CN_MINSUM, MAX_ITER_DEFAULT);
    @(negedge clk);
    for (int i = 0; i < N; i++) inputwithawgn[i] = llr_t'(sw[i]);
    inputready = 1'b1;
    @(posedge clk); t0 = cycle;
    @(negedge clk) inputready = 1'b0;
    while (outputready) @(negedge clk);     // falls when the word is initialised
    while (!outputready) @(negedge clk);
    lat = cycle - t0;
    checks++;
    if (decoder_output !== exp.bits) begin
      failures++;
      $display("word mismatch: got %b expected %b", decoder_output, exp.bits);
    end
    checks++;
    if (lat != 2 + 65 * exp.iters) begin
      failures++;
      $display("latency %0d, expected %0d (%0d iterations)", lat, 2 + 65 * exp.iters, exp.iters);
    end
    if (expect_sent) begin
      checks++;
      if (decoder_output !== sent) begin
        failures++;
        $display("light-noise word not corrected: got %b sent %b", decoder_output, sent);
      end
    end
    if (exp.iters == 1 && !syndrome_of(exp.bits)) n_one++;
    else if (!syndrome_of(exp.bits)) n_multi++;
    else n_limit++;
    if (exp.saturations > 0) n_sat++;
    if (decoder_output === sent) n_correct++;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    int sw [N];
    logic [N-1:0] cw;
    real sigma;
    for (int i = 0; i < N; i++) inputwithawgn[i] = '0;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    // a codeword with one weak wrong bit must be corrected
    cw = encode(17'h0001b);
    for (int i = 0; i < N; i++) sw[i] = cw[i] ? -100 : 100;
    sw[3] = cw[3] ? 10 : -10;
    run_word(sw, cw, 1'b1);
    for (int w = 0; w < NWORDS; w++) begin
      cw = encode(N'($urandom));
      sigma = (w % 4 == 0) ? 0.0 : (w % 4 == 1) ? 0.3 : (w % 4 == 2) ? 0.8 : 1.2;
      for (int i = 0; i < N; i++) sw[i] = soft_of(cw[i], sigma);
      run_word(sw, cw, sigma < 0.35);
    end
    // pure noise: mostly not a codeword, runs to the iteration limit
    for (int w = 0; w < 6; w++) begin
      for (int i = 0; i < N; i++) sw[i] = int'($urandom % 61) - 30;
      run_word(sw, '0, 1'b0);
    end
    $display("one-iteration stops %0d, multi-iteration stops %0d, limit stops %0d, saturating words %0d, correct %0d",
             n_one, n_multi, n_limit, n_sat, n_correct);
    checks++; if (n_one == 0)   begin failures++; $display("no one-iteration decoding"); end
    checks++; if (n_multi == 0) begin failures++; $display("no multi-iteration decoding"); end
    checks++; if (n_limit == 0) begin failures++; $display("no decoding hit the iteration limit"); end
    checks++; if (n_sat == 0)   begin failures++; $display("no saturation seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
