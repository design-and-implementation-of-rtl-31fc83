// Serial permutation circuit: a buffer of L registers between two 2:1
// multiplexers, plus the control circuit that drives their select.
//
// Normally a sample enters the buffer and leaves it L cycles later. When the
// select is 1, the input sample is sent straight to the output (0 cycles), and
// the sample leaving the buffer is written back into it, so it leaves L cycles
// later instead. The effect is that the samples at frame positions t-L and t
// trade places. The output stream is the input stream delayed by L with these
// swaps applied. One select drives both multiplexers, as in the 6-, 15- and
// 30-point architectures. The buffer, the two multiplexers and the
// single-select behaviour follow the published circuit.
// The control is this design's own: a modulo-N position counter indexes the
// N-bit pattern PAT (see np2_fft_pkg). Bit t set means "swap in the cycle where
// frame sample t is at the input".
//
// Interface: in_sync marks sample 0 of a frame at the input and restarts the
// position counter. Frames of N samples follow back to back. out_sync is
// in_sync delayed by L and marks sample 0 of the permuted frame.
module perm_cell #(
  parameter int          W   = np2_fft_pkg::DATA_W,
  parameter int          L   = 1,
  parameter int          N   = 6,
  parameter logic [63:0] PAT = 64'h8
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

  localparam int CW = (N > 1) ? $clog2(N) : 1;

  logic [CW-1:0] cnt_q, pos;
  logic sel;                            // select of both multiplexers
  logic signed [W-1:0] buf_re [L];
  logic signed [W-1:0] buf_im [L];
  logic signed [W-1:0] a_re, a_im;      // buffer input (node A)
  logic [L-1:0] sync_q;

  assign pos = in_sync ? '0 : cnt_q;
  assign sel = PAT[6'(pos)];

  always_comb begin
    a_re   = sel ? buf_re[L-1] : in_re;
    a_im   = sel ? buf_im[L-1] : in_im;
    out_re = sel ? in_re : buf_re[L-1];
    out_im = sel ? in_im : buf_im[L-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_q  <= '0;
      sync_q <= '0;
      for (int i = 0; i < L; i++) begin
        buf_re[i] <= '0;
        buf_im[i] <= '0;
      end
    end else begin
      cnt_q     <= (int'(pos) == N - 1) ? '0 : pos + 1'b1;
      sync_q[0] <= in_sync;
      buf_re[0] <= a_re;
      buf_im[0] <= a_im;
      for (int i = 1; i < L; i++) begin
        sync_q[i] <= sync_q[i-1];
        buf_re[i] <= buf_re[i-1];
        buf_im[i] <= buf_im[i-1];
      end
    end
  end

  assign out_sync = sync_q[L-1];

endmodule
