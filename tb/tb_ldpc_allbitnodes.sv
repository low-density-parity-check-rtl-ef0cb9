// tb_ldpc_allbitnodes: random L(r) matrix and L(p) vector into parallel,
// semi-parallel and serial bit node arrays; every L(q_ij) must be the
// saturated L(p_i) + sum of the column's other messages (Eq. 2.16), 0 where H
// has no edge, after 15, 34 and 274 cycles (Table 4.1).
module tb_ldpc_allbitnodes;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  localparam arch_e AR [3] = '{ARCH_PARALLEL, ARCH_SEMI_PARALLEL, ARCH_SERIAL};
  localparam int    LAT [3] = '{15, 34, 274};
  logic clk = 1'b0, reset = 1'b1, en = 1'b0;
  llr_t pin [N], rin [M][N];
  llr_t qout [3][N][M];
  logic [2:0] rdy;
  longint cycle = 0, t_rdy [3];
  int checks = 0, failures = 0, n_sat = 0;
  for (genvar d = 0; d < 3; d++) begin : g
    ldpc_allbitnodes #(.ARCH(AR[d])) dut (
      .clk, .reset, .enable_allbitnodes(en), .pin, .rin, .qout(qout[d]), .output_ready(rdy[d]));
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
        for (int i = 0; i < N; i++) rin[j][i] = H[j][i] ? llr_t'(int'($urandom % 255) - 127) : llr_t'($urandom);
      @(negedge clk) en = 1'b1; t0 = cycle;
      @(negedge clk) en = 1'b0;
      repeat (280) @(negedge clk);
      for (int d = 0; d < 3; d++) begin
        checks++;
        if (t_rdy[d] - t0 != LAT[d]) begin failures++; $display("array %0d latency %0d", d, t_rdy[d] - t0); end
        for (int i = 0; i < N; i++)
          for (int j = 0; j < M; j++) begin
            int e;
            e = 0;
            if (H[j][i]) begin
              e = int'(pin[i]);
              for (int k = 0; k < M; k++) if (H[k][i] && k != j) e += int'(rin[k][i]);
              if (sat(e) != e) n_sat++;
              e = sat(e);
            end
            checks++;
            if (int'(qout[d][i][j]) != e) begin
              failures++; $display("array %0d q[%0d][%0d]=%0d expected %0d", d, i, j, qout[d][i][j], e);
            end
          end
      end
    end
    checks++; if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
