// tb_ldpc_allchecknodes: a random L(q) matrix goes to three check node arrays
// (parallel min-sum, semi-parallel look-up table, serial piecewise linear);
// every L(r_ji) is compared with Eq. 2.20 folded over the row in index order,
// and the array latency with Table 4.1: 20, 44 and 254 cycles.
module tb_ldpc_allchecknodes;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  localparam arch_e      AR [3] = '{ARCH_PARALLEL, ARCH_SEMI_PARALLEL, ARCH_SERIAL};
  localparam cn_method_e ME [3] = '{CN_MINSUM, CN_LUT, CN_PIECEWISE};
  localparam int         LAT [3] = '{20, 44, 254};
  logic clk = 1'b0, reset = 1'b1, en = 1'b0;
  llr_t qin [N][M];
  llr_t rout [3][M][N];
  logic [2:0] rdy;
  longint cycle = 0, t_rdy [3];
  int checks = 0, failures = 0;
  for (genvar d = 0; d < 3; d++) begin : g
    ldpc_allchecknodes #(.ARCH(AR[d]), .METHOD(ME[d])) dut (
      .clk, .reset, .enable_allchecknodes(en), .qin, .rout(rout[d]), .output_ready(rdy[d]));
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
      for (int i = 0; i < N; i++)
        for (int j = 0; j < M; j++) qin[i][j] = llr_t'(int'($urandom % 255) - 127);
      @(negedge clk) en = 1'b1; t0 = cycle;
      @(negedge clk) en = 1'b0;
      repeat (260) @(negedge clk);
      for (int d = 0; d < 3; d++) begin
        checks++;
        if (t_rdy[d] - t0 != LAT[d]) begin failures++; $display("array %0d latency %0d", d, t_rdy[d] - t0); end
        for (int j = 0; j < M; j++)
          for (int i = 0; i < N; i++) begin
            int mag, sgn, first, e;
            mag = 0; sgn = 0; first = 1;
            if (H[j][i])
              for (int k = 0; k < N; k++) begin
                int a;
                if (!H[j][k] || k == i) continue;
                a = (qin[k][j] < 0) ? -int'(qin[k][j]) : int'(qin[k][j]);
                if (qin[k][j] < 0) sgn ^= 1;
                if (first) begin mag = a; first = 0; end
                else begin
                  mag = ((a < mag) ? a : mag) + ref_y(ME[d], a + mag)
                        - ref_y(ME[d], (a > mag) ? a - mag : mag - a);
                  if (mag < 0) mag = 0;
                end
              end
            e = sgn ? -mag : mag;
            checks++;
            if (int'(rout[d][j][i]) != e) begin
              failures++; $display("array %0d r[%0d][%0d]=%0d expected %0d", d, j, i, rout[d][j][i], e);
            end
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
