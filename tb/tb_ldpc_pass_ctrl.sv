// tb_ldpc_pass_ctrl: with a model unit of latency L = 5, a three-pass control
// logic must enable the unit three times, one cycle after each ready, raise
// writeback with every ready (passes 0, 1, 2 in order) and signal outputready
// PASSES*(L+1)+2 = 20 cycles after its enable; the one-pass variant passes
// enable and ready straight through.
module tb_ldpc_pass_ctrl;
  localparam int L = 5;
  logic clk = 1'b0, reset = 1'b1, en = 1'b0;
  logic ue3, wb3, or3, ur3, ue1, wb1, or1, ur1;
  logic [1:0] pass3;
  logic [0:0] pass1;
  int checks = 0, failures = 0;
  longint cycle = 0;
  ldpc_pass_ctrl #(.PASSES(3)) u3 (.clk, .reset, .enable_from_toplevel(en), .unit_ready(ur3),
                                   .unit_enable(ue3), .writeback(wb3), .pass(pass3), .outputready(or3));
  ldpc_pass_ctrl #(.PASSES(1)) u1 (.clk, .reset, .enable_from_toplevel(en), .unit_ready(ur1),
                                   .unit_enable(ue1), .writeback(wb1), .pass(pass1), .outputready(or1));
  // model units: ready L cycles after enable
  logic [L-1:0] sh3 = '0, sh1 = '0;
  always @(posedge clk) begin sh3 <= {sh3[L-2:0], ue3}; sh1 <= {sh1[L-2:0], ue1}; cycle <= cycle + 1; end
  assign ur3 = sh3[L-1];
  assign ur1 = sh1[L-1];
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int n_en, n_wb, last_wb_pass;
  longint t_or3, t_or1, t_en;
  always @(negedge clk) begin
    if (ue3) n_en++;
    if (wb3) begin
      checks++; if (int'(pass3) != last_wb_pass + 1) failures++;
      last_wb_pass = int'(pass3); n_wb++;
    end
    if (or3) t_or3 = cycle;
    if (or1) t_or1 = cycle;
    if (ue1 != en || or1 != ur1 || wb1 != ur1) begin checks++; failures++; end
  end
  initial begin
    repeat (L + 3) @(negedge clk); reset = 1'b0;   // long enough to flush the model units
    for (int r = 0; r < 5; r++) begin
      n_en = 0; n_wb = 0; last_wb_pass = -1; t_or3 = -1; t_or1 = -1;
      @(negedge clk); en = 1'b1; t_en = cycle; @(negedge clk) en = 1'b0;
      repeat (30) @(negedge clk);
      checks++; if (n_en != 3) begin failures++; $display("unit enabled %0d times", n_en); end
      checks++; if (n_wb != 3) begin failures++; $display("%0d writebacks", n_wb); end
      checks++; if (t_or3 - t_en != 3 * (L + 1) + 2) begin failures++; $display("3-pass latency %0d", t_or3 - t_en); end
      checks++; if (t_or1 - t_en != L) begin failures++; $display("1-pass latency %0d", t_or1 - t_en); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
