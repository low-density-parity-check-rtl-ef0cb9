// tb_ldpc_bit_node_sub: L(p) plus the included messages, saturated to
// [-127, 127]; both the registered (FAST = 0) and the same-cycle (FAST = 1)
// variants. Saturation must occur in both directions.
module tb_ldpc_bit_node_sub;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  logic clk = 1'b0, reset = 1'b1, clear = 1'b0, r_valid = 1'b0, incl = 1'b0;
  logic out_en0 = 1'b0, out_en1 = 1'b0;
  llr_t p_in, r_in, q0, q1;
  int checks = 0, failures = 0, n_hi = 0, n_lo = 0;
  ldpc_bit_node_sub #(.FAST(1'b0)) u0 (.clk, .reset, .clear, .p_in, .r_valid, .incl, .r_in, .out_en(out_en0), .q_out(q0));
  ldpc_bit_node_sub #(.FAST(1'b1)) u1 (.clk, .reset, .clear, .p_in, .r_valid, .incl, .r_in, .out_en(out_en1), .q_out(q1));
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    p_in = '0; r_in = '0;
    repeat (2) @(negedge clk); reset = 1'b0;
    for (int r = 0; r < 300; r++) begin
      int tot, len;
      p_in = llr_t'(int'($urandom % 255) - 127);
      clear = 1'b1; @(negedge clk) clear = 1'b0;
      tot = int'(p_in);
      len = 1 + $urandom % 6;
      for (int k = 0; k < len; k++) begin
        r_in = (r % 3 == 0) ? llr_t'(int'($urandom % 21) - 10) : llr_t'(int'($urandom % 255) - 127);
        incl = 1'($urandom); r_valid = 1'b1;
        if (incl) tot += int'(r_in);
        out_en1 = (k == len - 1);
        @(negedge clk);
      end
      r_valid = 1'b0; incl = 1'b0; out_en1 = 1'b0;
      out_en0 = 1'b1; @(negedge clk) out_en0 = 1'b0;
      if (tot > 127) n_hi++;
      if (tot < -127) n_lo++;
      checks += 2;
      if (int'(q0) != sat(tot)) begin failures++; $display("FAST=0 got %0d expected %0d", q0, sat(tot)); end
      if (int'(q1) != sat(tot)) begin failures++; $display("FAST=1 got %0d expected %0d", q1, sat(tot)); end
    end
    checks++; if (n_hi == 0 || n_lo == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
