// tb_ldpc_decodebigq: hard decisions (1 for a negative LLR, 0 for zero or
// positive, Eq. 2.18) and the 17-cycle latency of Table 4.1.
module tb_ldpc_decodebigq;
  import ldpc_pkg::*;
  logic clk = 1'b0, reset = 1'b1, en = 1'b0, rdy;
  llr_t bigq [N];
  logic [N-1:0] dec;
  longint cycle = 0;
  int checks = 0, failures = 0;
  ldpc_decodebigq dut (.clk, .reset, .enable_decodebigQ(en), .bigq, .decoded_output(dec), .output_ready(rdy));
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    longint t0;
    logic [N-1:0] e;
    repeat (2) @(negedge clk); reset = 1'b0;
    for (int r = 0; r < 30; r++) begin
      for (int i = 0; i < N; i++) begin
        bigq[i] = (i % 5 == r % 5) ? 8'sd0 : llr_t'($urandom);
        e[i] = (int'(bigq[i]) < 0);
      end
      @(negedge clk) en = 1'b1; t0 = cycle;
      @(negedge clk) en = 1'b0;
      while (!rdy) @(negedge clk);
      checks += 2;
      if (cycle - t0 != 17) begin failures++; $display("latency %0d", cycle - t0); end
      if (dec !== e) begin failures++; $display("got %b expected %b", dec, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
