// Serial pipelined 30-point FFT without twiddle factors.
//
// Radix-5, radix-3 and radix-2 serial butterflies joined by two permutation
// networks and no rotator. Because 30 = 5 * 6 with coprime factors, the
// radix-5 stage and a 6-point stage need no rotation between them. The 6-point
// stage is itself the twiddle-free 6-point FFT: radix-3, two 1-register
// permutation circuits, radix-2.
//   radix-5 -> network of six circuits (buffers 1, 2, 7, 7, 2, 1; latency 20)
//   -> radix-3 -> network of two circuits (buffers 1, 1; latency 2) -> radix-2
// The first network sends output k of radix-5 butterfly j (position 5j+k) to
// input j of 6-point block k (position 6k+j).
//   Input : position 5j+m (j = 0..5, m = 0..4) holds x[<6m + 5 g(j)>_30] with
//           g = (0, 2, 4, 3, 5, 1), the 6-point input order.
//   Output: position 6k+q holds X[K] with K = k (mod 5) and K = h(q) (mod 6),
//           h = (0, 3, 4, 1, 2, 5), the 6-point output order.
// The chain of units, the buffer lengths and the swaps of the first network
// follow the published 30-point architecture and its data-movement table. The
// input and output orders above are this design's derivation. They meet the
// same twiddle-free condition and the same first-network permutation.
// Latency is 9 + 20 + 4 + 2 + 2 = 37 cycles, the published figure.
//
// Interface as fft6; out_sync follows in_sync by 37 cycles.
module fft30 #(
  parameter int W = np2_fft_pkg::DATA_W
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
  import np2_fft_pkg::*;

  localparam int N   = 30;
  localparam int LAT = 37;

  // Frame rhythm rule: a new in_sync comes either exactly N cycles after the
  // previous one (back-to-back frames) or at least N + LAT cycles after it
  // (the previous frame has left the pipeline before the units re-phase).
  logic [7:0] since_sync;
  always_ff @(posedge clk) begin
    if (rst)          since_sync <= '1;
    else if (in_sync) since_sync <= 8'd1;
    else if (since_sync != '1) since_sync <= since_sync + 8'd1;
  end
  a_frame_rhythm: assert property (@(posedge clk) disable iff (rst)
    in_sync |-> (since_sync == 8'(N) || since_sync >= 8'(N + LAT)))
    else $error("fft30: in_sync breaks the frame rhythm");

  logic                sy1, sy2, sy3, sy4;
  logic signed [W-1:0] re1, im1, re2, im2, re3, im3, re4, im4;

  bf_r5 #(.W(W)) u_r5 (
    .clk, .rst, .in_sync, .in_re, .in_im,
    .out_sync(sy1), .out_re(re1), .out_im(im1)
  );

  perm_net #(
    .W(W), .N(P30_N), .STAGES(P30_STAGES), .LEN(P30_LEN), .PAT(P30_PAT)
  ) u_perm53 (
    .clk, .rst, .in_sync(sy1), .in_re(re1), .in_im(im1),
    .out_sync(sy2), .out_re(re2), .out_im(im2)
  );

  bf_r3 #(.W(W)) u_r3 (
    .clk, .rst, .in_sync(sy2), .in_re(re2), .in_im(im2),
    .out_sync(sy3), .out_re(re3), .out_im(im3)
  );

  perm_net #(
    .W(W), .N(P6_N), .STAGES(P6_STAGES), .LEN(P6_LEN), .PAT(P6_PAT)
  ) u_perm32 (
    .clk, .rst, .in_sync(sy3), .in_re(re3), .in_im(im3),
    .out_sync(sy4), .out_re(re4), .out_im(im4)
  );

  bf_r2 #(.W(W)) u_r2 (
    .clk, .rst, .in_sync(sy4), .in_re(re4), .in_im(im4),
    .out_sync, .out_re, .out_im
  );

endmodule
