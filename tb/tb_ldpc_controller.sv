// tb_ldpc_controller: the controller drives model modules that answer each
// enable with a ready after a fixed number of cycles (computebigQ sometimes
// faster, sometimes slower than allbitnodes). The syndrome stays nonzero for
// a chosen number of iterations. Checked: initialization follows
// create_input, one check node run per iteration, decodebigQ only after both
// bit-node-side modules have finished, stop at a zero syndrome or after 20
// iterations, decoder_output equal to the candidate of the last iteration,
// outputready one cycle after the syndrome's ready and held until the next word.
module tb_ldpc_controller;
  import ldpc_pkg::*;
  logic clk = 1'b0, reset = 1'b1;
  logic r_ci = 1'b0, r_init, r_cn, r_bn, r_q, r_dec, r_syn, syndrome;
  logic [N-1:0] cand, dout;
  logic e_init, e_cn, e_bn, e_q, e_dec, e_syn, outputready, busy;
  logic [4:0] iterations;
  int checks = 0, failures = 0;
  int n_cn, n_limit = 0, n_early = 0, n_qslow = 0, need, qlat;
  longint cycle = 0, t_syn;

  ldpc_controller dut (
    .clk, .reset, .outputready_createinp(r_ci), .outputready_initialization(r_init),
    .outputready_allchecknodes(r_cn), .outputready_allbitnodes(r_bn),
    .outputready_computebigQ(r_q), .outputready_decodebigQ(r_dec),
    .outputready_computesyndrome(r_syn), .syndrome, .decoded_candidate(cand),
    .enable_initialization(e_init), .enable_allchecknodes(e_cn),
    .enable_allbitnodes(e_bn), .enable_computebigQ(e_q), .enable_decodebigQ(e_dec),
    .enable_computesyndrome(e_syn), .decoder_output(dout), .outputready, .iterations, .busy);

  // model modules: ready = enable delayed
  logic [31:0] d_init = '0, d_cn = '0, d_bn = '0, d_q = '0, d_dec = '0, d_syn = '0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    d_init <= {d_init[30:0], e_init}; d_cn <= {d_cn[30:0], e_cn}; d_bn <= {d_bn[30:0], e_bn};
    d_q <= {d_q[30:0], e_q}; d_dec <= {d_dec[30:0], e_dec}; d_syn <= {d_syn[30:0], e_syn};
  end
  always #5 clk = ~clk;
  assign r_init = d_init[0];
  assign r_cn   = d_cn[3];
  assign r_bn   = d_bn[2];
  assign r_q    = d_q[qlat];
  assign r_dec  = d_dec[1];
  assign r_syn  = d_syn[1];
  assign syndrome = (n_cn < need);

  // decodebigQ may start only when both sides are done
  logic bn_seen, q_seen;
  always @(negedge clk) begin
    if (e_bn) begin bn_seen = 0; q_seen = 0; end
    if (r_bn) bn_seen = 1;
    if (r_q)  q_seen = 1;
    if (e_cn) begin n_cn++; cand = N'($urandom); end
    if (r_syn) t_syn = cycle;
    if (e_dec) begin
      checks++;
      if (!(bn_seen && q_seen)) begin failures++; $display("decodebigQ enabled early"); end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int want;
    cand = '0; qlat = 1; need = 0;
    repeat (2) @(negedge clk); reset = 1'b0;
    for (int w = 0; w < 30; w++) begin
      need = (w % 6 == 5) ? 25 : $urandom % 6;
      qlat = (w % 2) ? 1 : 4;
      if (qlat > 2) n_qslow++;
      n_cn = 0;
      @(negedge clk) r_ci = 1'b1;
      @(negedge clk) r_ci = 1'b0;
      checks++; if (outputready) begin failures++; $display("outputready not cleared"); end
      while (!outputready) @(negedge clk);
      // iteration k ends with a nonzero syndrome while k < need
      want = (need == 0) ? 1 : (need > 20) ? 20 : need;
      checks += 4;
      if (n_cn != want) begin failures++; $display("%0d check node runs, expected %0d", n_cn, want); end
      if (int'(iterations) != want) begin failures++; $display("iterations %0d", iterations); end
      if (dout !== cand) begin failures++; $display("decoder_output is not the last candidate"); end
      if (cycle - t_syn != 1) begin failures++; $display("decision took %0d cycles", cycle - t_syn); end
      if (want == 20) n_limit++; else n_early++;
      repeat (5) @(negedge clk);
      checks++; if (!outputready) begin failures++; $display("outputready not held"); end
    end
    checks++; if (n_limit == 0 || n_early == 0 || n_qslow == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
