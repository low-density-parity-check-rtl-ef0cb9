// tb_ldpc_initialization: every column of q_init receives pin, output_ready
// follows the enable by one cycle, and the matrix holds without an enable.
module tb_ldpc_initialization;
  import ldpc_pkg::*;
  logic clk = 1'b0, reset = 1'b1, enable_initialization = 1'b0, output_ready;
  llr_t pin [N], qout_init [N][M];
  int checks = 0, failures = 0;
  ldpc_initialization dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    llr_t want [N];
    for (int i = 0; i < N; i++) pin[i] = '0;
    repeat (2) @(negedge clk); reset = 1'b0;
    for (int r = 0; r < 10; r++) begin
      for (int i = 0; i < N; i++) pin[i] = llr_t'($urandom);
      want = pin;
      enable_initialization = 1'b1;
      @(negedge clk) enable_initialization = 1'b0;
      chk(output_ready, "output_ready after one cycle");
      for (int i = 0; i < N; i++) pin[i] = llr_t'($urandom);
      @(negedge clk);
      chk(!output_ready, "single pulse");
      for (int i = 0; i < N; i++)
        for (int j = 0; j < M; j++)
          chk(qout_init[i][j] == want[i], $sformatf("q_init[%0d][%0d]", i, j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
