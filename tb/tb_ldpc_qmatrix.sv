// tb_ldpc_qmatrix: the check nodes see q_init after enable_initialization and
// the bit-node matrix after enable_allbitnodes, alternating several times.
module tb_ldpc_qmatrix;
  import ldpc_pkg::*;
  logic clk = 1'b0, reset = 1'b1, enable_initialization = 1'b0, enable_allbitnodes = 1'b0;
  llr_t qout_init [N][M], qout_bitmatrix [N][M], qout [N][M];
  int checks = 0, failures = 0;
  ldpc_qmatrix dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic expect_src(bit bitm);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < M; j++) begin
        checks++;
        if (qout[i][j] != (bitm ? qout_bitmatrix[i][j] : qout_init[i][j])) failures++;
      end
  endtask
  initial begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < M; j++) begin
        qout_init[i][j] = llr_t'($urandom); qout_bitmatrix[i][j] = llr_t'($urandom);
        if (qout_init[i][j] == qout_bitmatrix[i][j]) qout_bitmatrix[i][j] ^= 8'h01;
      end
    repeat (2) @(negedge clk); reset = 1'b0;
    expect_src(1'b0);
    for (int r = 0; r < 4; r++) begin
      enable_allbitnodes = 1'b1; @(negedge clk) enable_allbitnodes = 1'b0;
      repeat (3) @(negedge clk); expect_src(1'b1);
      enable_initialization = 1'b1; @(negedge clk) enable_initialization = 1'b0;
      repeat (3) @(negedge clk); expect_src(1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
