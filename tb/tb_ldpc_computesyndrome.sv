// tb_ldpc_computesyndrome: syndrome vector and flag for codewords (all zero)
// and random words, with the 12-cycle latency of Table 4.1.
module tb_ldpc_computesyndrome;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  logic clk = 1'b0, reset = 1'b1, en = 1'b0, rdy, syndrome;
  logic [N-1:0] c;
  logic [M-1:0] s;
  longint cycle = 0;
  int checks = 0, failures = 0, n_zero = 0, n_nonzero = 0;
  ldpc_computesyndrome dut (.clk, .reset, .enable_computesyndrome(en), .decoded_output(c), .s, .syndrome, .output_ready(rdy));
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    longint t0;
    logic [M-1:0] e;
    repeat (2) @(negedge clk); reset = 1'b0;
    for (int r = 0; r < 60; r++) begin
      c = (r % 2) ? encode(N'($urandom)) : N'($urandom);
      for (int j = 0; j < M; j++) begin
        e[j] = 1'b0;
        for (int i = 0; i < N; i++) if (H[j][i] && c[i]) e[j] = ~e[j];
      end
      @(negedge clk) en = 1'b1; t0 = cycle;
      @(negedge clk) en = 1'b0;
      while (!rdy) @(negedge clk);
      checks += 3;
      if (cycle - t0 != 12) begin failures++; $display("latency %0d", cycle - t0); end
      if (s !== e) begin failures++; $display("S %b expected %b", s, e); end
      if (syndrome !== (e != '0)) failures++;
      if (e == '0) n_zero++; else n_nonzero++;
    end
    checks++; if (n_zero == 0 || n_nonzero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
