// Shared constants of the serial non-power-of-two FFTs (6, 15 and 30 points).
//
// Number format: every sample is a complex pair of DATA_W-bit two's-complement
// integers. As in the reference FPGA implementation, the word does not grow
// through the transform (16 bits in, 16 bits out); the user scales the input so
// that the outputs fit. Constant multipliers use COEF_W-bit coefficients with
// COEF_FRAC fractional bits and truncate the product (arithmetic shift right).
// The coefficient format is this design's choice.
//
// Permutation-circuit control patterns: bit t of a pattern is the select of
// one serial permutation circuit in the cycle when sample t of a frame (counted
// at that circuit's own input) is present. A set bit sends the input straight to
// the output and recirculates the sample leaving the buffer, i.e. it swaps the
// samples at frame positions t-L and t. The patterns follow from the per-stage
// data-movement tables of the three architectures: a swap between positions p
// and p+L in stage i sets bit p+L of stage i's pattern.
package np2_fft_pkg;

  parameter int DATA_W    = 16;
  parameter int COEF_W    = 16;
  parameter int COEF_FRAC = 14;

  // Radix-3 constant: sqrt(3)/2 in Q2.14.
  parameter logic signed [COEF_W-1:0] C3_SIN60 = 16'sd14189;

  // Radix-5 constants (Winograd-style flow graph), Q2.14.
  //   K1 = -1/4 is applied as an arithmetic shift by 2 and a subtraction.
  //   K2 = (cos(2pi/5) - cos(4pi/5)) / 2              =  0.5590
  //   K3 = j (sin(4pi/5) - sin(2pi/5))                = -j 0.3633
  //   K4 = -j sin(4pi/5)                              = -j 0.5878
  //   K5 = j (sin(4pi/5) + sin(2pi/5))                =  j 1.5388
  // K3..K5 are purely imaginary: the value stored is the imaginary factor.
  parameter logic signed [COEF_W-1:0] C5_K2 = 16'sd9159;
  parameter logic signed [COEF_W-1:0] C5_K3 = -16'sd5952;
  parameter logic signed [COEF_W-1:0] C5_K4 = -16'sd9630;
  parameter logic signed [COEF_W-1:0] C5_K5 = 16'sd25212;

  // Butterfly latencies, first input sample to first output sample.
  parameter int LAT_R2 = 2;
  parameter int LAT_R3 = 4;
  parameter int LAT_R5 = 9;

  // Maximum number of cascaded serial permutation circuits in one network.
  parameter int PERM_MAX = 6;
  typedef int unsigned len_arr_t [PERM_MAX];
  typedef logic [63:0] pat_arr_t [PERM_MAX];

  // 6-point network, radix-3 -> radix-2: two circuits with buffers of length 1.
  parameter int       P6_N      = 6;
  parameter int       P6_STAGES = 2;
  parameter len_arr_t P6_LEN    = '{1, 1, 0, 0, 0, 0};
  parameter pat_arr_t P6_PAT    = '{64'h8, 64'h14, 64'h0, 64'h0, 64'h0, 64'h0};

  // 15-point network, radix-5 -> radix-3: buffers of length 2, 2 and 4.
  parameter int       P15_N      = 15;
  parameter int       P15_STAGES = 3;
  parameter len_arr_t P15_LEN    = '{2, 2, 4, 0, 0, 0};
  parameter pat_arr_t P15_PAT    = '{64'hC60, 64'h2108, 64'h1240, 64'h0, 64'h0, 64'h0};

  // 30-point network, radix-5 -> radix-3: buffers of length 1, 2, 7, 7, 2, 1.
  parameter int       P30_N      = 30;
  parameter int       P30_STAGES = 6;
  parameter len_arr_t P30_LEN    = '{1, 2, 7, 7, 2, 1};
  parameter pat_arr_t P30_PAT    = '{64'h22449122, 64'h09100890, 64'h05555400,
                                     64'h222A8880, 64'h21818184, 64'h2944114A};

  // Sum of the first n buffer lengths of a network (latency up to stage n).
  function automatic int unsigned len_sum(len_arr_t len, int n);
    int unsigned s = 0;
    for (int i = 0; i < PERM_MAX; i++) if (i < n) s += len[i];
    return s;
  endfunction

endpackage
