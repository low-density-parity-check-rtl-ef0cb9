// ldpc_scan_seq: sequencer of one functional-unit run.
//
// A check node, bit node or computebigQ unit does its work by reading its
// input messages one per cycle, index 0..LEN-1 over a row or column of H
// (the index comparator "i' >= N" / "j' >= M" of the source's node
// diagrams). This sequencer produces that schedule. A one-cycle start pulse
// in cycle t gives fetch = 1 and idx = k in cycle t+1+k (k = 0..LEN-1),
// out_en = 1 in cycle t+LAST and ready = 1 in cycle t+LAST+1, so the run
// takes LAST+1 cycles from start to ready. A start while busy is ignored.
module ldpc_scan_seq #(
  parameter int LEN  = 17,
  parameter int LAST = LEN + 2
) (
  input  logic clk,
  input  logic reset,
  input  logic start,
  output logic fetch,
  output logic [$clog2(LEN+1)-1:0] idx,
  output logic out_en,
  output logic ready
);

  localparam int PW = $clog2(LAST + 1);
  logic [PW-1:0] ph;   // 0 = idle, otherwise cycles since start

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      ph    <= '0;
      ready <= 1'b0;
    end else begin
      ready <= out_en;
      if (ph == '0) begin
        if (start) ph <= PW'(1);
      end else if (ph == PW'(LAST)) begin
        ph <= '0;
      end else begin
        ph <= ph + 1'b1;
      end
    end
  end

  assign fetch  = (ph != '0) && (ph <= PW'(LEN));
  assign idx    = fetch ? ($bits(idx))'(ph - 1'b1) : '0;
  assign out_en = (ph == PW'(LAST));

endmodule
