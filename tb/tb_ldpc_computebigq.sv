// tb_ldpc_computebigq: L(Q_i) = saturated L(p_i) + sum of all of column i's
// messages, for the parallel, semi-parallel and serial arrays; latencies
// 14, 32 and 257 cycles, each shorter than the bit node array's (15, 34, 274)
// that runs beside it.
module tb_ldpc_computebigq;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  localparam arch_e AR [3] = '{ARCH_PARALLEL, ARCH_SEMI_PARALLEL, ARCH_SERIAL};
  localparam int    LAT [3] = '{14, 32, 257};
  logic clk = 1'b0, reset = 1'b1, en = 1'b0;
  llr_t pin [N], rin [M][N];
  llr_t bigq [3][N];
  logic [2:0] rdy;
  longint cycle = 0, t_rdy [3];
  int checks = 0, failures = 0;
  for (genvar d = 0; d < 3; d++) begin : g
    ldpc_computebigq #(.ARCH(AR[d])) dut (
      .clk, .reset, .enable_computebigQ(en), .pin, .rin, .bigq(bigq[d]), .output_ready(rdy[d]));
    always @(negedge clk) if (rdy[d]) t_rdy[d] = cycle;
  end
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    longint t0;
    repeat (2) @(negedge clk); reset = 1'b0;
    for (int r = 0; r < 6; r++) begin
      for (int i = 0; i < N; i++) pin[i] = llr_t'(int'($urandom % 255) - 127);
      for (int j = 0; j < M; j++)
        for (int i = 0; i < N; i++) rin[j][i] = H[j][i] ? llr_t'(int'($urandom % 121) - 60) : llr_t'($urandom);
      @(negedge clk) en = 1'b1; t0 = cycle;
      @(negedge clk) en = 1'b0;
      repeat (280) @(negedge clk);
      for (int d = 0; d < 3; d++) begin
        checks++;
        if (t_rdy[d] - t0 != LAT[d]) begin failures++; $display("array %0d latency %0d", d, t_rdy[d] - t0); end
        for (int i = 0; i < N; i++) begin
          int e;
          e = int'(pin[i]);
          for (int k = 0; k < M; k++) if (H[k][i]) e += int'(rin[k][i]);
          checks++;
          if (int'(bigq[d][i]) != sat(e)) begin
            failures++; $display("array %0d Q[%0d]=%0d expected %0d", d, i, bigq[d][i], sat(e));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
