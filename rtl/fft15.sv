// Serial pipelined 15-point FFT without twiddle factors (prime-factor form).
//
// A serial radix-5 butterfly, a permutation network of three serial
// permutation circuits (buffers of 2, 2 and 4 registers), and a serial radix-3
// butterfly. With 15 = 5 * 3 and coprime factors, the input and output orders
// remove all rotations between the butterflies.
//   Input : position 5j+m (j = 0..2, m = 0..4) holds x[<3m + 10j>_15], i.e.
//           x0 x3 x6 x9 x12 | x10 x13 x1 x4 x7 | x5 x8 x11 x14 x2
//   Output: position 3k+l holds X[K] with K = k (mod 5), K = 2l (mod 3), i.e.
//           X0 X5 X10 X6 X11 X1 X12 X2 X7 X3 X8 X13 X9 X14 X4
// Structure, orders and permutation follow the published 15-point
// architecture. Latency is 9 + 8 + 4 = 21 cycles, the published figure.
//
// Interface as fft6; out_sync follows in_sync by 21 cycles.
module fft15 #(
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

  localparam int N   = 15;
  localparam int LAT = 21;

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
    else $error("fft15: in_sync breaks the frame rhythm");

  logic                sy1, sy2;
  logic signed [W-1:0] re1, im1, re2, im2;

  bf_r5 #(.W(W)) u_r5 (
    .clk, .rst, .in_sync, .in_re, .in_im,
    .out_sync(sy1), .out_re(re1), .out_im(im1)
  );

  perm_net #(
    .W(W), .N(P15_N), .STAGES(P15_STAGES), .LEN(P15_LEN), .PAT(P15_PAT)
  ) u_perm (
    .clk, .rst, .in_sync(sy1), .in_re(re1), .in_im(im1),
    .out_sync(sy2), .out_re(re2), .out_im(im2)
  );

  bf_r3 #(.W(W)) u_r3 (
    .clk, .rst, .in_sync(sy2), .in_re(re2), .in_im(im2),
    .out_sync, .out_re, .out_im
  );

endmodule
