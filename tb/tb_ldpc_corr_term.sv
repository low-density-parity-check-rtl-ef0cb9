// tb_ldpc_corr_term: exhaustive check of the correction term for all pairs of
// magnitudes and all four methods against y() written from Tables 2.1, 2.2 and
// the linear rule.
module tb_ldpc_corr_term;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  mag_t a, b;
  logic signed [5:0] d [4];
  int checks = 0, failures = 0;
  ldpc_corr_term #(.METHOD(CN_MINSUM))    u0 (.a, .b, .delta(d[0]));
  ldpc_corr_term #(.METHOD(CN_LUT))       u1 (.a, .b, .delta(d[1]));
  ldpc_corr_term #(.METHOD(CN_PIECEWISE)) u2 (.a, .b, .delta(d[2]));
  ldpc_corr_term #(.METHOD(CN_LINEAR))    u3 (.a, .b, .delta(d[3]));
  localparam cn_method_e MS [4] = '{CN_MINSUM, CN_LUT, CN_PIECEWISE, CN_LINEAR};
  initial begin
    #1000000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int x = 0; x < 128; x++)
      for (int y = 0; y < 128; y++) begin
        a = mag_t'(x); b = mag_t'(y);
        #1;
        for (int m = 0; m < 4; m++) begin
          int e;
          e = ref_y(MS[m], x + y) - ref_y(MS[m], (x > y) ? x - y : y - x);
          checks++;
          if (int'(d[m]) != e) begin
            failures++;
            if (failures < 10) $display("method %0d a=%0d b=%0d delta=%0d expected %0d", m, x, y, d[m], e);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
