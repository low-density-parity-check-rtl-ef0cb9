// ldpc_allchecknodes: all check nodes; produces the L(r) message matrix.
//
// A check node unit holds N check node sub-modules (one per bit position of its
// row) and a fetch register. In a run, the unit reads L(q_i'j) for
// i' = 0..N-1 from the q matrix, one per cycle, and every sub-module i folds in
// the inputs of row j other than its own, so after N+3 cycles each active
// sub-module holds L(r_ji) (20 cycles for N = 17, Table 4.1).
//
// ARCH sets the number of units (Section 3.3.2): M in the parallel architecture,
// one per check node, enabled once per iteration; M/2 in the semi-parallel
// one, unit g handling rows g and g+M/2 in two passes; one in the serial one,
// handling the M rows in turn. With fewer units than rows the pass results are
// written into an M x N register matrix by ldpc_pass_ctrl. METHOD selects the
// correction term (min-sum, look-up table, piecewise linear, linear).
// rout[j][i] is 0 where H[j][i] = 0. enable_allchecknodes is a one-cycle pulse;
// output_ready pulses when rout is complete and rout holds until the next run.
// In the parallel architecture the units write their outputs directly, so the
// pass control's writeback strobe is unused there (a lint notice only).
module ldpc_allchecknodes
  import ldpc_pkg::*;
#(
  parameter arch_e      ARCH   = ARCH_PARALLEL,
  parameter cn_method_e METHOD = CN_MINSUM
) (
  input  logic clk,
  input  logic reset,
  input  logic enable_allchecknodes,
  input  llr_t qin  [N][M],
  output llr_t rout [M][N],
  output logic output_ready
);

  localparam int U  = cn_units(ARCH);
  localparam int P  = (M + U - 1) / U;
  localparam int IW = $clog2(N + 1);

  logic unit_en, unit_ready, writeback;
  logic [$clog2(P+1)-1:0] pass;
  logic fetch, out_en;
  logic [IW-1:0] idx;

  ldpc_pass_ctrl #(.PASSES(P)) u_ctrl (
    .clk, .reset, .enable_from_toplevel(enable_allchecknodes), .unit_ready,
    .unit_enable(unit_en), .writeback, .pass, .outputready(output_ready));

  ldpc_scan_seq #(.LEN(N)) u_seq (
    .clk, .reset, .start(unit_en), .fetch, .idx, .out_en, .ready(unit_ready));

  logic          valid_q;
  logic [IW-1:0] idx_q;
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin valid_q <= 1'b0; idx_q <= '0; end
    else       begin valid_q <= fetch; idx_q <= idx; end
  end

  llr_t rsub [U][N];

  for (genvar g = 0; g < U; g++) begin : g_unit
    int   row;
    logic [N-1:0] mask;
    llr_t q_f;

    always_comb begin
      row  = int'(pass) * U + g;
      mask = (row < M) ? H[row] : '0;
    end

    always_ff @(posedge clk or posedge reset) begin
      if (reset)      q_f <= '0;
      else if (fetch) q_f <= (row < M) ? qin[idx][row] : '0;
    end

    for (genvar i = 0; i < N; i++) begin : g_sub
      llr_t r_raw;
      ldpc_check_node_sub #(.METHOD(METHOD)) u_sub (
        .clk, .reset, .clear(unit_en), .q_valid(valid_q),
        .incl(mask[idx_q] && (idx_q != IW'(i))), .q_in(q_f),
        .out_en, .r_out(r_raw));
      assign rsub[g][i] = mask[i] ? r_raw : '0;
    end
  end

  if (P == 1) begin : g_direct
    always_comb
      for (int j = 0; j < M; j++) rout[j] = rsub[j];
  end else begin : g_store
    always_ff @(posedge clk or posedge reset) begin
      if (reset) begin
        for (int j = 0; j < M; j++)
          for (int i = 0; i < N; i++) rout[j][i] <= '0;
      end else if (writeback) begin
        for (int g = 0; g < U; g++)
          for (int j = 0; j < M; j++)
            if (j == int'(pass) * U + g) rout[j] <= rsub[g];
      end
    end
  end

endmodule
