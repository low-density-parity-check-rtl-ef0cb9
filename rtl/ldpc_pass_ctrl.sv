// ldpc_pass_ctrl: control logic of a time-multiplexed node array.
//
// In the semi-parallel and serial architectures there are fewer functional
// units than nodes, so each unit is enabled PASSES times per iteration
// (Figures 3.11 and 3.12). enable_from_toplevel (a pulse) starts pass 0 one
// cycle later; every unit_ready ends a pass: writeback is high in that cycle,
// so the parent stores the pass's results, and the next pass is enabled in the
// following cycle. After the last pass one more cycle passes and outputready
// pulses. With unit latency L the array takes PASSES*(L+1)+2 cycles, which
// reproduces the source's Table 4.1 (semi-parallel 2*21+2 = 44 and 2*16+2 = 34,
// serial 12*21+2 = 254 and 17*16+2 = 274). With PASSES = 1 (parallel
// architecture) there is no control logic: the enable goes straight to the
// units and their ready straight out.
// clk and reset are then unused, which lint reports.
module ldpc_pass_ctrl #(
  parameter int PASSES = 2
) (
  input  logic clk,
  input  logic reset,
  input  logic enable_from_toplevel,
  input  logic unit_ready,
  output logic unit_enable,
  output logic writeback,
  output logic [$clog2(PASSES+1)-1:0] pass,
  output logic outputready
);

  if (PASSES == 1) begin : g_direct
    assign unit_enable = enable_from_toplevel;
    assign writeback   = unit_ready;
    assign pass        = '0;
    assign outputready = unit_ready;
  end else begin : g_multi
    typedef enum logic [1:0] {S_IDLE, S_RUN, S_FIN} state_e;
    state_e state;
    logic   en_q, rdy_q;

    always_ff @(posedge clk or posedge reset) begin
      if (reset) begin
        state <= S_IDLE; en_q <= 1'b0; rdy_q <= 1'b0; pass <= '0;
      end else begin
        en_q  <= 1'b0;
        rdy_q <= 1'b0;
        unique case (state)
          S_IDLE: if (enable_from_toplevel) begin
            pass <= '0; en_q <= 1'b1; state <= S_RUN;
          end
          S_RUN: if (unit_ready) begin
            if (pass == ($bits(pass))'(PASSES - 1)) state <= S_FIN;
            else begin
              pass <= pass + 1'b1; en_q <= 1'b1;
            end
          end
          S_FIN: begin
            rdy_q <= 1'b1; state <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end

    assign unit_enable = en_q;
    assign writeback   = (state == S_RUN) && unit_ready;
    assign outputready = rdy_q;
  end

endmodule
