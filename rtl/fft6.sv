// Serial pipelined 6-point FFT without twiddle factors (prime-factor form).
//
// A serial radix-3 butterfly, a permutation network of two 1-register serial
// permutation circuits, and a serial radix-2 butterfly. Because 6 = 3 * 2 with
// coprime factors, the input and output orders are chosen so that no rotation
// is needed between the butterflies. Every unit is busy every cycle.
//   Input order : x[0] x[2] x[4] x[3] x[5] x[1]   (position 3j+m holds x[<2m+3j>_6])
//   Output order: X[0] X[3] X[4] X[1] X[2] X[5]
// The structure, the orders and the permutation follow the published 6-point
// architecture. Latency, first input to first output, is 4 + 2 + 2 = 8 cycles,
// the published figure.
//
// Interface: one complex sample per cycle. in_sync marks the first sample of a
// frame; frames follow back to back (re-asserting in_sync re-aligns).
// out_sync marks the first output sample of a frame, LAT = 8 cycles later.
module fft6 #(
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

  localparam int N   = 6;
  localparam int LAT = 8;

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
    else $error("fft6: in_sync breaks the frame rhythm");

  logic                sy1, sy2;
  logic signed [W-1:0] re1, im1, re2, im2;

  bf_r3 #(.W(W)) u_r3 (
    .clk, .rst, .in_sync, .in_re, .in_im,
    .out_sync(sy1), .out_re(re1), .out_im(im1)
  );

  perm_net #(
    .W(W), .N(P6_N), .STAGES(P6_STAGES), .LEN(P6_LEN), .PAT(P6_PAT)
  ) u_perm (
    .clk, .rst, .in_sync(sy1), .in_re(re1), .in_im(im1),
    .out_sync(sy2), .out_re(re2), .out_im(im2)
  );

  bf_r2 #(.W(W)) u_r2 (
    .clk, .rst, .in_sync(sy2), .in_re(re2), .in_im(im2),
    .out_sync, .out_re, .out_im
  );

endmodule
