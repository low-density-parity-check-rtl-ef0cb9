// ldpc_allbitnodes: all bit nodes; produces the L(q) message matrix.
//
// A bit node unit holds M bit node sub-modules (one per check position of its
// column) and a fetch register. In a run the unit reads L(r_j'i) for
// j' = 0..M-1 from the r matrix, one per cycle, and sub-module j forms
// L(q_ij) = L(p_i) + sum of L(r_j'i) over the column's checks other than j
// (Eq. 2.16), so a run takes M+3 cycles (15 for M = 12, Table 4.1).
//
// ARCH sets the number of units: N in the parallel architecture; ceil(N/2) = 9
// in the semi-parallel one, unit g handling columns g and g+9 in two passes
// (N = 17 is odd, so one unit idles in the second pass); one in the serial
// one, handling the N columns in turn. qout[i][j] is 0 where H[j][i] = 0.
// enable_allbitnodes is a pulse; output_ready pulses when qout is complete.
// In the parallel architecture the units write their outputs directly, so the
// pass control's writeback strobe is unused there (a lint notice only).
module ldpc_allbitnodes
  import ldpc_pkg::*;
#(
  parameter arch_e ARCH = ARCH_PARALLEL
) (
  input  logic clk,
  input  logic reset,
  input  logic enable_allbitnodes,
  input  llr_t pin  [N],
  input  llr_t rin  [M][N],
  output llr_t qout [N][M],
  output logic output_ready
);

  localparam int U  = bn_units(ARCH);
  localparam int P  = (N + U - 1) / U;
  localparam int JW = $clog2(M + 1);

  logic unit_en, unit_ready, writeback;
  logic [$clog2(P+1)-1:0] pass;
  logic fetch, out_en;
  logic [JW-1:0] idx;

  ldpc_pass_ctrl #(.PASSES(P)) u_ctrl (
    .clk, .reset, .enable_from_toplevel(enable_allbitnodes), .unit_ready,
    .unit_enable(unit_en), .writeback, .pass, .outputready(output_ready));

  ldpc_scan_seq #(.LEN(M)) u_seq (
    .clk, .reset, .start(unit_en), .fetch, .idx, .out_en, .ready(unit_ready));

  logic          valid_q;
  logic [JW-1:0] idx_q;
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin valid_q <= 1'b0; idx_q <= '0; end
    else       begin valid_q <= fetch; idx_q <= idx; end
  end

  llr_t qsub [U][M];

  for (genvar g = 0; g < U; g++) begin : g_unit
    int   col;
    logic [M-1:0] mask;
    llr_t r_f, p_sel;

    always_comb begin
      col   = int'(pass) * U + g;
      mask  = (col < N) ? hcol(col) : '0;
      p_sel = (col < N) ? pin[col] : '0;
    end

    always_ff @(posedge clk or posedge reset) begin
      if (reset)      r_f <= '0;
      else if (fetch) r_f <= (col < N) ? rin[idx][col] : '0;
    end

    for (genvar j = 0; j < M; j++) begin : g_sub
      llr_t q_raw;
      ldpc_bit_node_sub #(.FAST(1'b0)) u_sub (
        .clk, .reset, .clear(unit_en), .p_in(p_sel), .r_valid(valid_q),
        .incl(mask[idx_q] && (idx_q != JW'(j))), .r_in(r_f),
        .out_en, .q_out(q_raw));
      assign qsub[g][j] = mask[j] ? q_raw : '0;
    end
  end

  if (P == 1) begin : g_direct
    always_comb
      for (int i = 0; i < N; i++) qout[i] = qsub[i];
  end else begin : g_store
    always_ff @(posedge clk or posedge reset) begin
      if (reset) begin
        for (int i = 0; i < N; i++)
          for (int j = 0; j < M; j++) qout[i][j] <= '0;
      end else if (writeback) begin
        for (int g = 0; g < U; g++)
          for (int i = 0; i < N; i++)
            if (i == int'(pass) * U + g) qout[i] <= qsub[g];
      end
    end
  end

endmodule
