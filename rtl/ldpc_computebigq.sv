// ldpc_computebigq: extrinsic LLRs L(Q_i) of the decoder output bits.
//
// A computebigQ unit has the bit node sub-module's adder but keeps every
// message of its column: L(Q_i) = L(p_i) + sum over all checks j of L(r_ji).
// It reads the column one message per cycle and registers the saturated sum
// together with the last message, so a run takes M+2 cycles, one less than a
// bit node run (the source notes computebigQ is the faster of the two units that
// run side by side). ARCH sets the number of units as for allbitnodes: N, ceil(N/2)
// (two passes) or 1 (N passes). enable_computebigQ is a pulse; output_ready
// pulses when bigq is complete.
// In the parallel architecture the units write their outputs directly, so the
// pass control's writeback strobe is unused there (a lint notice only).
module ldpc_computebigq
  import ldpc_pkg::*;
#(
  parameter arch_e ARCH = ARCH_PARALLEL
) (
  input  logic clk,
  input  logic reset,
  input  logic enable_computebigQ,
  input  llr_t pin  [N],
  input  llr_t rin  [M][N],
  output llr_t bigq [N],
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
    .clk, .reset, .enable_from_toplevel(enable_computebigQ), .unit_ready,
    .unit_enable(unit_en), .writeback, .pass, .outputready(output_ready));

  ldpc_scan_seq #(.LEN(M), .LAST(M + 1)) u_seq (
    .clk, .reset, .start(unit_en), .fetch, .idx, .out_en, .ready(unit_ready));

  logic          valid_q;
  logic [JW-1:0] idx_q;
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin valid_q <= 1'b0; idx_q <= '0; end
    else       begin valid_q <= fetch; idx_q <= idx; end
  end

  llr_t qsub [U];

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

    ldpc_bit_node_sub #(.FAST(1'b1)) u_sub (
      .clk, .reset, .clear(unit_en), .p_in(p_sel), .r_valid(valid_q),
      .incl(mask[idx_q]), .r_in(r_f), .out_en, .q_out(qsub[g]));
  end

  if (P == 1) begin : g_direct
    assign bigq = qsub;
  end else begin : g_store
    always_ff @(posedge clk or posedge reset) begin
      if (reset) begin
        for (int i = 0; i < N; i++) bigq[i] <= '0;
      end else if (writeback) begin
        for (int g = 0; g < U; g++)
          for (int i = 0; i < N; i++)
            if (i == int'(pass) * U + g) bigq[i] <= qsub[g];
      end
    end
  end

endmodule
