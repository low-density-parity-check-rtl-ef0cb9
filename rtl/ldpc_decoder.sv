// ldpc_decoder: iterative log-domain sum-product decoder for an irregular
// (17, 5) LDPC code.
//
// The received word arrives as N = 17 soft bits (8-bit signed, -128..127 for a
// channel value of -3..3) with a rising edge of inputready. create_input turns
// them into a-priori LLRs, initialization fills the bit-to-check message matrix
// with them, and then each iteration runs allchecknodes (check-to-bit messages),
// allbitnodes and computebigQ side by side (new bit-to-check messages and the
// output LLRs), decodebigQ (hard decision) and computesyndrome. The controller
// stops when the syndrome is zero or after MAX_ITER iterations, puts the hard
// decision on decoder_output and raises outputready (held until the next codeword).
//
// ARCH selects the parallel, semi-parallel or serial architecture and METHOD the
// check-node rule (min-sum, or min-sum plus a look-up table, piecewise linear or
// linear correction term). Latency from the inputready edge to outputready is
// 2 + k * T cycles for k iterations, with T = 65 (parallel), 108 (semi-parallel)
// or 558 (serial); for one iteration that is 67, 110 and 560 cycles, the figures
// of the source's Table 4.1. The module structure and port list follow the
// source's top-level diagram and port table; the defaults are the parallel
// architecture with min-sum check nodes and 20 iterations.
//
// Lint notes: the syndrome vector s and the controller's iterations and busy
// outputs are left unconnected at this level (they serve observation and the
// block tests), and reset is reported as used both asynchronously and
// synchronously only because the controller's overlap assertion is disabled
// during reset; the logic itself resets asynchronously throughout.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter arch_e      ARCH     = ARCH_PARALLEL,
  parameter cn_method_e METHOD   = CN_MINSUM,
  parameter int         MAX_ITER = ldpc_pkg::MAX_ITER_DEFAULT
) (
  input  logic           clk,
  input  logic           reset,          // asynchronous, active high
  input  logic           inputready,
  input  llr_t           inputwithawgn [N],
  output logic [N-1:0]   decoder_output,
  output logic           outputready
);

  llr_t pout [N];
  llr_t qout_init [N][M], qout_bitmatrix [N][M], qout [N][M];
  llr_t rout [M][N];
  llr_t bigq [N];
  logic [N-1:0] decoded;
  logic [M-1:0] s;
  logic syndrome;
  logic rdy_ci, rdy_init, rdy_cn, rdy_bn, rdy_q, rdy_dec, rdy_syn;
  logic en_init, en_cn, en_bn, en_q, en_dec, en_syn;
  logic [$clog2(MAX_ITER+1)-1:0] iterations;
  logic busy;

  ldpc_create_input u_create_input (
    .clk, .reset, .inputready, .inputwithawgn, .pout, .outputready(rdy_ci));

  ldpc_initialization u_initialization (
    .clk, .reset, .enable_initialization(en_init), .pin(pout),
    .qout_init, .output_ready(rdy_init));

  ldpc_qmatrix u_qmatrix (
    .clk, .reset, .enable_initialization(en_init), .enable_allbitnodes(en_bn),
    .qout_init, .qout_bitmatrix, .qout);

  ldpc_allchecknodes #(.ARCH(ARCH), .METHOD(METHOD)) u_allchecknodes (
    .clk, .reset, .enable_allchecknodes(en_cn), .qin(qout), .rout,
    .output_ready(rdy_cn));

  ldpc_allbitnodes #(.ARCH(ARCH)) u_allbitnodes (
    .clk, .reset, .enable_allbitnodes(en_bn), .pin(pout), .rin(rout),
    .qout(qout_bitmatrix), .output_ready(rdy_bn));

  ldpc_computebigq #(.ARCH(ARCH)) u_computebigq (
    .clk, .reset, .enable_computebigQ(en_q), .pin(pout), .rin(rout),
    .bigq, .output_ready(rdy_q));

  ldpc_decodebigq u_decodebigq (
    .clk, .reset, .enable_decodebigQ(en_dec), .bigq,
    .decoded_output(decoded), .output_ready(rdy_dec));

  ldpc_computesyndrome u_computesyndrome (
    .clk, .reset, .enable_computesyndrome(en_syn), .decoded_output(decoded),
    .s, .syndrome, .output_ready(rdy_syn));

  ldpc_controller #(.MAX_ITER(MAX_ITER)) u_controller (
    .clk, .reset,
    .outputready_createinp(rdy_ci), .outputready_initialization(rdy_init),
    .outputready_allchecknodes(rdy_cn), .outputready_allbitnodes(rdy_bn),
    .outputready_computebigQ(rdy_q), .outputready_decodebigQ(rdy_dec),
    .outputready_computesyndrome(rdy_syn), .syndrome, .decoded_candidate(decoded),
    .enable_initialization(en_init), .enable_allchecknodes(en_cn),
    .enable_allbitnodes(en_bn), .enable_computebigQ(en_q),
    .enable_decodebigQ(en_dec), .enable_computesyndrome(en_syn),
    .decoder_output, .outputready, .iterations, .busy);

endmodule
