// tb_ldpc_variants: the decoder in the other configurations of the design.
//
// Five decoders receive the same words side by side: parallel with the
// look-up-table, piecewise-linear and linear correction terms, and the
// semi-parallel and serial architectures with min-sum check nodes. Every
// result is compared with the reference model for its check-node method, and
// the latency with 2 + T * iterations, T = 65 / 108 / 558 cycles for the
// parallel / semi-parallel / serial architecture (one iteration: 67, 110 and
// 560 cycles, Table 4.1). It also requires that the correction term changed
// some check-node result, and that some decodings needed several iterations
// in the time-multiplexed architectures.
module tb_ldpc_variants;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int ND = 5;
  localparam int NWORDS = 40;
  localparam arch_e      ARCHS [ND] = '{ARCH_PARALLEL, ARCH_PARALLEL, ARCH_PARALLEL,
                                        ARCH_SEMI_PARALLEL, ARCH_SERIAL};
  localparam cn_method_e METHS [ND] = '{CN_LUT, CN_PIECEWISE, CN_LINEAR, CN_MINSUM, CN_MINSUM};
  localparam int         PERIT [ND] = '{65, 65, 65, 108, 558};

  logic clk = 1'b0, reset = 1'b1, inputready = 1'b0;
  llr_t inputwithawgn [N];
  logic [N-1:0] dout [ND];
  logic [ND-1:0] ordy;
  longint cycle = 0, tdone [ND];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  for (genvar d = 0; d < ND; d++) begin : g_dut
    ldpc_decoder #(.ARCH(ARCHS[d]), .METHOD(METHS[d])) dut (
      .clk, .reset, .inputready, .inputwithawgn, .decoder_output(dout[d]),
      .outputready(ordy[d]));
    logic prev = 1'b0;
    always @(posedge clk) begin
      prev <= ordy[d];
      if (ordy[d] && !prev) tdone[d] <= cycle;
    end
  end

  int checks = 0, failures = 0, n_corr = 0, n_multi_tm = 0, n_differs = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_word(int sw [N]);
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
        $display("decoder %0d: got %b expected %b", d, dout[d], exp[d].bits);
      end
      checks++;
      if (tdone[d] - t0 != 2 + PERIT[d] * exp[d].iters) begin
        failures++;
        $display("decoder %0d: latency %0d expected %0d", d, tdone[d] - t0,
                 2 + PERIT[d] * exp[d].iters);
      end
      if (METHS[d] != CN_MINSUM && exp[d].corrections > 0) n_corr++;
      if (ARCHS[d] != ARCH_PARALLEL && exp[d].iters > 1) n_multi_tm++;
    end
    if (exp[1].bits !== exp[3].bits || exp[1].iters != exp[3].iters) n_differs++;
  endtask

  initial begin
    int sw [N];
    logic [N-1:0] cw;
    for (int i = 0; i < N; i++) inputwithawgn[i] = '0;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    for (int w = 0; w < NWORDS; w++) begin
      cw = encode(N'($urandom));
      for (int i = 0; i < N; i++) sw[i] = soft_of(cw[i], (w % 2) ? 0.9 : 0.5);
      run_word(sw);
    end
    $display("correction used %0d, multi-iteration time-multiplexed %0d, piecewise differs from min-sum %0d",
             n_corr, n_multi_tm, n_differs);
    checks++; if (n_corr == 0)     begin failures++; $display("correction term never acted"); end
    checks++; if (n_multi_tm == 0) begin failures++; $display("no multi-iteration run in semi/serial"); end
    checks++; if (n_differs == 0)  begin failures++; $display("methods never differed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
