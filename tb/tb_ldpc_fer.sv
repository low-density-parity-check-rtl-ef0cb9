// tb_ldpc_fer: reduced frame-error-rate sweep of the four parallel decoders.
//
// The four check-node methods (min-sum, look-up table, piecewise linear,
// linear) decode the same noisy words side by side at the SNR points
// 1.5, 2.0, ..., 5.0 dB. Each word is a random codeword sent as BPSK
// (0 -> +1, 1 -> -1) with Gaussian noise of variance 10^(-SNR/10), i.e. the
// SNR is taken per symbol of unit power, the usual convention of a simulated
// AWGN channel; the sample is quantised to the 8-bit input scale.
// Every decoded word and its latency (2 + 65 * iterations cycles) are checked
// against the reference model, and frame errors against the transmitted
// codeword are counted and printed per method and SNR point. The word count
// per point (WORDS) is far below what a real error-rate curve needs, so the
// printed rates are only indicative; the test requires that errors become
// rarer from the lowest to the highest SNR and that the decoders were
// exercised at every point.
module tb_ldpc_fer;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int ND     = 4;
  localparam int NSNR   = 8;
  localparam int WORDS  = 40;
  localparam cn_method_e METHS [ND] = '{CN_MINSUM, CN_LUT, CN_PIECEWISE, CN_LINEAR};

  logic clk = 1'b0, reset = 1'b1, inputready = 1'b0;
  llr_t inputwithawgn [N];
  logic [N-1:0] dout [ND];
  logic [ND-1:0] ordy;
  longint cycle = 0, tdone [ND];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  for (genvar d = 0; d < ND; d++) begin : g_dut
    ldpc_decoder #(.METHOD(METHS[d])) dut (
      .clk, .reset, .inputready, .inputwithawgn, .decoder_output(dout[d]),
      .outputready(ordy[d]));
    logic prev = 1'b0;
    always @(posedge clk) begin
      prev <= ordy[d];
      if (ordy[d] && !prev) tdone[d] <= cycle;
    end
  end

  int checks = 0, failures = 0;
  int ferr [ND][NSNR];

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_word(int sw [N], logic [N-1:0] cw, int p);
    ref_result_t exp [ND];
    longint t0;
    for (int d = 0; d < ND; d++) exp[d] = ref_decode(sw, METHS[d], MAX_ITER_DEFAULT);
    @(negedge clk);
    for (int i = 0; i < N; i++) inputwithawgn[i] = llr_t'(sw[i]);
    inputready = 1'b1;
    @(posedge clk); t0 = cycle;
    @(negedge clk) inputready = 1'b0;
    while (ordy != '0) @(negedge clk);
    while (ordy != '1) @(negedge clk);
    @(negedge clk);
    for (int d = 0; d < ND; d++) begin
      checks++;
      if (dout[d] !== exp[d].bits) begin
        failures++;
        $display("method %0d: got %b expected %b", d, dout[d], exp[d].bits);
      end
      checks++;
      if (tdone[d] - t0 != 2 + 65 * exp[d].iters) begin
        failures++;
        $display("method %0d: latency %0d expected %0d", d, tdone[d] - t0,
                 2 + 65 * exp[d].iters);
      end
      if (dout[d] !== cw) ferr[d][p]++;
    end
  endtask

  initial begin
    int sw [N];
    logic [N-1:0] cw;
    real snr, sigma;
    for (int i = 0; i < N; i++) inputwithawgn[i] = '0;
    for (int d = 0; d < ND; d++) for (int p = 0; p < NSNR; p++) ferr[d][p] = 0;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    for (int p = 0; p < NSNR; p++) begin
      snr   = 1.5 + 0.5 * p;
      sigma = 10.0 ** (-snr / 20.0);
      for (int w = 0; w < WORDS; w++) begin
        cw = encode(N'($urandom));
        for (int i = 0; i < N; i++) sw[i] = soft_of(cw[i], sigma);
        run_word(sw, cw, p);
      end
      $display("SNR %3.1f dB  FER min-sum %5.3f  LUT %5.3f  piecewise %5.3f  linear %5.3f", snr,
               ferr[0][p] / real'(WORDS), ferr[1][p] / real'(WORDS),
               ferr[2][p] / real'(WORDS), ferr[3][p] / real'(WORDS));
    end
    for (int d = 0; d < ND; d++) begin
      checks++;
      if (ferr[d][NSNR-1] > ferr[d][0]) begin
        failures++;
        $display("method %0d: more frame errors at %3.1f dB than at 1.5 dB", d, 1.5 + 0.5 * (NSNR - 1));
      end
    end
    checks++;
    if (ferr[0][0] == 0) begin
      failures++;
      $display("no frame error at the lowest SNR: the sweep did not reach the error region");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
