// Permutation network between two serial butterflies: STAGES serial
// permutation circuits in cascade.
//
// It reorders each N-sample frame from the output order of one butterfly stage
// to the input order of the next. Stage i has a buffer of LEN[i] registers and
// swap pattern PAT[i]. The latency is the sum of the buffer lengths. For each
// architecture this is the least latency possible: it equals the largest
// distance any sample has to move. The buffer lengths and the swaps come
// from the published data-movement tables:
//   6 points : lengths 1, 1         (latency 2)
//   15 points: lengths 2, 2, 4      (latency 8)
//   30 points: lengths 1, 2, 7, 7, 2, 1 (latency 20)
// The network maps output k of butterfly j (frame position R1*j + k, R1 being
// the radix of the first butterfly) to input j of butterfly k of the next
// stage (position (N/R1)*k + j). The 6-point network is the exception: it
// places output k of the second radix-3 butterfly next to output k of the
// first one.
//
// Interface: as perm_cell; out_sync follows in_sync by the total latency.
module perm_net
  import np2_fft_pkg::*;
#(
  parameter int       W      = DATA_W,
  parameter int       N      = P30_N,
  parameter int       STAGES = P30_STAGES,
  parameter len_arr_t LEN    = P30_LEN,
  parameter pat_arr_t PAT    = P30_PAT
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_sync,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_sync,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  logic                sy [STAGES+1];
  logic signed [W-1:0] re [STAGES+1];
  logic signed [W-1:0] im [STAGES+1];

  assign sy[0] = in_sync;
  assign re[0] = in_re;
  assign im[0] = in_im;

  for (genvar g = 0; g < STAGES; g++) begin : g_stage
    perm_cell #(
      .W  (W),
      .L  (int'(LEN[g])),
      .N  (N),
      .PAT(PAT[g])
    ) u_cell (
      .clk     (clk),
      .rst     (rst),
      .in_sync (sy[g]),
      .in_re   (re[g]),
      .in_im   (im[g]),
      .out_sync(sy[g+1]),
      .out_re  (re[g+1]),
      .out_im  (im[g+1])
    );
  end

  assign out_sync = sy[STAGES];
  assign out_re   = re[STAGES];
  assign out_im   = im[STAGES];

endmodule
