// tb_ldpc_create_input: channel look-up table and input register.
// Checks pout against the reference LLR of every soft bit (including the
// worked example 100 -> entry for 2.3), the one-cycle latency of outputready,
// and that a held-high inputready samples only once (rising edge).
module tb_ldpc_create_input;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  logic clk = 1'b0, reset = 1'b1, inputready = 1'b0, outputready;
  llr_t inputwithawgn [N], pout [N];
  int checks = 0, failures = 0;
  ldpc_create_input dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    llr_t held [N];
    for (int i = 0; i < N; i++) inputwithawgn[i] = '0;
    repeat (2) @(negedge clk); reset = 1'b0;
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < N; i++)
        inputwithawgn[i] = (r == 0 && i == 0) ? 8'sd100 : llr_t'($urandom);
      if (r == 1) inputwithawgn[0] = -8'sd128;
      if (r == 2) inputwithawgn[0] = 8'sd127;
      held = inputwithawgn;
      @(negedge clk) inputready = 1'b1;
      @(negedge clk);
      chk(outputready, "outputready one cycle after inputready");
      for (int i = 0; i < N; i++)
        chk(int'(pout[i]) == ref_llr(int'(held[i])),
            $sformatf("pout[%0d]=%0d for %0d, expected %0d", i, pout[i], held[i], ref_llr(int'(held[i]))));
      if (r == 0) chk(pout[0] == 8'sd97, "worked example: 100 -> round(2.3*127/3) = 97");
      // inputready still high, input changes: no new sample
      for (int i = 0; i < N; i++) inputwithawgn[i] = llr_t'($urandom);
      @(negedge clk);
      chk(!outputready, "outputready is a single pulse");
      for (int i = 0; i < N; i++) chk(int'(pout[i]) == ref_llr(int'(held[i])), "held input kept");
      inputready = 1'b0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
