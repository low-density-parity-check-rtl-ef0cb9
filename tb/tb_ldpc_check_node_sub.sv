// tb_ldpc_check_node_sub: one sub-module is fed random message streams with a
// random include pattern; the result must be the sign XOR times the folded
// magnitude (plain minimum for min-sum, pairwise correction for the piecewise
// method), 0 when nothing was included.
module tb_ldpc_check_node_sub;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  logic clk = 1'b0, reset = 1'b1, clear = 1'b0, q_valid = 1'b0, incl = 1'b0, out_en = 1'b0;
  llr_t q_in, r_ms, r_pw;
  int checks = 0, failures = 0;
  ldpc_check_node_sub #(.METHOD(CN_MINSUM))    u_ms (.clk, .reset, .clear, .q_valid, .incl, .q_in, .out_en, .r_out(r_ms));
  ldpc_check_node_sub #(.METHOD(CN_PIECEWISE)) u_pw (.clk, .reset, .clear, .q_valid, .incl, .q_in, .out_en, .r_out(r_pw));
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    q_in = '0;
    repeat (2) @(negedge clk); reset = 1'b0;
    for (int r = 0; r < 300; r++) begin
      int mag_ms, mag_pw, sgn, first, len;
      clear = 1'b1; @(negedge clk) clear = 1'b0;
      mag_ms = 0; mag_pw = 0; sgn = 0; first = 1;
      len = 1 + $urandom % 8;
      for (int k = 0; k < len; k++) begin
        int a;
        q_in = (r % 5 == 0) ? llr_t'(int'($urandom % 7) - 3) : llr_t'(int'($urandom % 255) - 127);
        incl = (r % 50 == 7) ? 1'b0 : 1'($urandom);
        q_valid = 1'b1;
        if (incl) begin
          a = (q_in < 0) ? -int'(q_in) : int'(q_in);
          if (q_in < 0) sgn ^= 1;
          if (first) begin mag_ms = a; mag_pw = a; first = 0; end
          else begin
            int d;
            mag_ms = (a < mag_ms) ? a : mag_ms;
            d = ref_y(CN_PIECEWISE, a + mag_pw) - ref_y(CN_PIECEWISE, (a > mag_pw) ? a - mag_pw : mag_pw - a);
            mag_pw = ((a < mag_pw) ? a : mag_pw) + d;
            if (mag_pw < 0) mag_pw = 0;
          end
        end
        @(negedge clk);
      end
      q_valid = 1'b0; incl = 1'b0;
      out_en = 1'b1; @(negedge clk) out_en = 1'b0;
      checks += 2;
      if (int'(r_ms) != (sgn ? -mag_ms : mag_ms)) begin
        failures++; $display("min-sum: got %0d expected %0d", r_ms, sgn ? -mag_ms : mag_ms);
      end
      if (int'(r_pw) != (sgn ? -mag_pw : mag_pw)) begin
        failures++; $display("piecewise: got %0d expected %0d", r_pw, sgn ? -mag_pw : mag_pw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
