// Top level: the three twiddle-free serial FFT architectures side by side,
// plus the serial radix-4 butterfly of the same butterfly family.
//
// fft30 is the main design, a 30-point FFT. fft15 and fft6 are the 15- and
// 6-point members of the same family. bf_r4 is the serial radix-4 butterfly,
// which none of the three architectures uses; it stands alone as a serial
// 4-point transform (input x0 x2 x1 x3, output X0 X2 X1 X3, latency 4). Each
// has its own stream ports and runs on its own, all on one clock and one
// synchronous reset. The ports of every
// FFT are: in_sync (first sample of a frame), a complex input sample per cycle,
// out_sync (first sample of an output frame) and a complex output sample per
// cycle. Sample order and latency are described in fft30, fft15 and fft6.
module np2_fft_top #(
  parameter int W = np2_fft_pkg::DATA_W
) (
  input  logic                clk,
  input  logic                rst,
  // 30-point FFT
  input  logic                f30_in_sync,
  input  logic signed [W-1:0] f30_in_re,
  input  logic signed [W-1:0] f30_in_im,
  output logic                f30_out_sync,
  output logic signed [W-1:0] f30_out_re,
  output logic signed [W-1:0] f30_out_im,
  // 15-point FFT
  input  logic                f15_in_sync,
  input  logic signed [W-1:0] f15_in_re,
  input  logic signed [W-1:0] f15_in_im,
  output logic                f15_out_sync,
  output logic signed [W-1:0] f15_out_re,
  output logic signed [W-1:0] f15_out_im,
  // 6-point FFT
  input  logic                f6_in_sync,
  input  logic signed [W-1:0] f6_in_re,
  input  logic signed [W-1:0] f6_in_im,
  output logic                f6_out_sync,
  output logic signed [W-1:0] f6_out_re,
  output logic signed [W-1:0] f6_out_im,
  // serial radix-4 butterfly (4-point transform)
  input  logic                f4_in_sync,
  input  logic signed [W-1:0] f4_in_re,
  input  logic signed [W-1:0] f4_in_im,
  output logic                f4_out_sync,
  output logic signed [W-1:0] f4_out_re,
  output logic signed [W-1:0] f4_out_im
);

  fft30 #(.W(W)) u_fft30 (
    .clk, .rst,
    .in_sync(f30_in_sync), .in_re(f30_in_re), .in_im(f30_in_im),
    .out_sync(f30_out_sync), .out_re(f30_out_re), .out_im(f30_out_im)
  );

  fft15 #(.W(W)) u_fft15 (
    .clk, .rst,
    .in_sync(f15_in_sync), .in_re(f15_in_re), .in_im(f15_in_im),
    .out_sync(f15_out_sync), .out_re(f15_out_re), .out_im(f15_out_im)
  );

  fft6 #(.W(W)) u_fft6 (
    .clk, .rst,
    .in_sync(f6_in_sync), .in_re(f6_in_re), .in_im(f6_in_im),
    .out_sync(f6_out_sync), .out_re(f6_out_re), .out_im(f6_out_im)
  );

  bf_r4 #(.W(W)) u_bf_r4 (
    .clk, .rst,
    .in_sync(f4_in_sync), .in_re(f4_in_re), .in_im(f4_in_im),
    .out_sync(f4_out_sync), .out_re(f4_out_re), .out_im(f4_out_im)
  );

endmodule
