// ldpc_pkg: code definition and arithmetic shared by every block of the
// log-domain LDPC decoder.
//
// The parity-check matrix H, the code size (N bit nodes, M check nodes), the
// message width and the iteration limit live here, so that a different code is
// selected by editing this one file, as in the original design. The decoder is
// built for an irregular 12 x 17 code; the particular H below is this design's
// own (the source describes its size and irregularity but does not print it).
// It has column weights 2..4, row weights 3..5, no cycle of length four, and
// full rank, so K = N - M = 5 message bits.
//
// Fixed-point convention: every LLR is an 8-bit two's complement integer with
// 127 standing for 3.0, i.e. one LSB is 3/127 ~ 0.0236 (the soft-bit scale of the
// decoder input, which maps the channel range [-3, 3] onto [-128, 127]).
// The correction-term constants below are the source's real-valued tables
// converted with that scale: a value v becomes round(v * 127 / 3) and a bound t
// on |x| becomes ceil(t * 127 / 3), so "x < t" keeps its meaning on integers.
// The integer locals of the helper functions are wider than the values they
// hold; lint reports their unused upper bits.
package ldpc_pkg;

  localparam int N        = 17;   // bit nodes = codeword length
  localparam int M        = 12;   // check nodes
  localparam int W        = 8;    // message width in bits
  localparam int MAX_ITER_DEFAULT = 20;   // iteration limit (Section 3.2.8)
  localparam int MAGW     = W - 1;

  typedef logic signed [W-1:0] llr_t;
  typedef logic [MAGW-1:0]     mag_t;

  // H[j][i] = 1 when check node j is connected to bit node i (bit i = column i).
  localparam logic [N-1:0] H [M] = '{
    17'b00000010000011100,
    17'b01000000010001011,
    17'b00110010001000001,
    17'b10000010000100010,
    17'b00001100000000001,
    17'b00001000101101000,
    17'b00101000000000110,
    17'b10010000010000100,
    17'b00100001010110000,
    17'b00000001100000101,
    17'b00000101001000010,
    17'b01010100100010000
  };

  // Column i of H as an M-bit vector (bit j = row j).
  function automatic logic [M-1:0] hcol(int i);
    logic [M-1:0] c;
    for (int j = 0; j < M; j++) c[j] = H[j][i];
    return c;
  endfunction

  // Architectures of Section 3.3.2 and check-node methods of Section 3.3.
  typedef enum logic [1:0] {
    ARCH_PARALLEL      = 2'd0,
    ARCH_SEMI_PARALLEL = 2'd1,
    ARCH_SERIAL        = 2'd2
  } arch_e;

  typedef enum logic [1:0] {
    CN_MINSUM    = 2'd0,   // correction term omitted
    CN_LUT       = 2'd1,   // Table 2.1
    CN_PIECEWISE = 2'd2,   // Table 2.2
    CN_LINEAR    = 2'd3    // y = 0.6 - |x|/4
  } cn_method_e;

  // Number of functional units of each kind for an architecture.
  function automatic int cn_units(arch_e a);
    return (a == ARCH_PARALLEL) ? M : (a == ARCH_SEMI_PARALLEL) ? (M + 1) / 2 : 1;
  endfunction
  function automatic int bn_units(arch_e a);
    return (a == ARCH_PARALLEL) ? N : (a == ARCH_SEMI_PARALLEL) ? (N + 1) / 2 : 1;
  endfunction

  // Saturate a wide signed sum to the symmetric message range [-127, 127].
  function automatic llr_t sat_llr(logic signed [W+3:0] v);
    localparam logic signed [W+3:0] HI = (1 <<< (W - 1)) - 1;
    if (v > HI)  return llr_t'(HI);
    if (v < -HI) return llr_t'(-HI);
    return llr_t'(v);
  endfunction

  // |x| limited to 127 (the value -128 cannot come out of the decoder's
  // own arithmetic, but an input could hold it).
  function automatic mag_t abs_llr(llr_t x);
    if (x == llr_t'(-(1 <<< (W - 1)))) return '1;
    return x[W-1] ? mag_t'(-x) : mag_t'(x);
  endfunction

  // y(x) = log(1 + exp(-|x|)) approximation, x in LSBs (0..254), result in LSBs.
  function automatic logic [4:0] corr_y(cn_method_e m, logic [MAGW:0] x);
    logic signed [6:0] v;
    unique case (m)
      CN_LUT: begin
        if      (x < 9)   v = 28;   // [0,0.2)   0.65
        else if (x < 17)  v = 23;   // [0.2,0.4) 0.55
        else if (x < 30)  v = 19;   // [0.4,0.7) 0.45
        else if (x < 43)  v = 15;   // [0.7,1.0) 0.35
        else if (x < 64)  v = 11;   // [1.0,1.5) 0.25
        else if (x < 94)  v = 6;    // [1.5,2.2) 0.15
        else if (x < 191) v = 2;    // [2.2,4.5) 0.05
        else              v = 0;
      end
      CN_PIECEWISE: begin
        if      (x < 22)  v = 7'sd30 - 7'(x >> 1);   // -x/2  + 0.7
        else if (x < 68)  v = 7'sd24 - 7'(x >> 2);   // -x/4  + 0.575
        else if (x < 94)  v = 7'sd16 - 7'(x >> 3);   // -x/8  + 0.375
        else if (x < 136) v = 7'sd10 - 7'(x >> 4);   // -x/16 + 0.2375
        else if (x < 187) v = 7'sd6  - 7'(x >> 5);   // -x/32 + 0.1375
        else              v = 0;
      end
      CN_LINEAR: begin
        v = (x >= 100) ? 7'sd0 : 7'sd25 - 7'(x >> 2);  // -x/4 + 0.6
      end
      default: v = 0;
    endcase
    return (v < 0) ? 5'd0 : 5'(v);
  endfunction

  // Channel look-up table of the create_input block (Eq. 3.2): the soft bit s
  // stands for X = 3 s / 127, X is quantised in steps of 0.1 toward zero,
  // and the LLR is X * 127 / (3 sigma^2) with sigma^2 = 1, rounded.
  function automatic llr_t channel_llr(llr_t s);
    int k, y;
    k = (int'(s) * 30) / 127;          // tenths of a unit, truncated toward zero
    if (k > 30)  k = 30;
    if (k < -30) k = -30;
    y = (k >= 0) ? (k * 127 + 15) / 30 : -((-k * 127 + 15) / 30);
    return llr_t'(y);
  endfunction

endpackage
