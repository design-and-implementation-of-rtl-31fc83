// Serial radix-2 butterfly: one complex sample per cycle in, one out, 100 %
// adder utilisation.
//
// A 2-point DFT of the samples a (cycle 0) and b (cycle 1) is computed with one
// adder and one subtractor that are shared between real and imaginary parts.
// A serial-parallel exchange at the input (two 2:1 multiplexers with select S0
// and the registers A, C) lines up a.re with b.re in cycle 1 and a.im with b.im
// in cycle 2; the adders produce E = C + D and F = C - D. A second exchange at
// the output (select S1, registers G and the output register) reassembles the
// results into complex samples. The datapath, its register placement and signal
// names A..H follow the published radix-2 serial butterfly; the select
// timing (S0 high in the second cycle of a pair, S1 high in the first) is
// derived here from that datapath.
//
// Interface: in_sync marks the first sample a of a pair (sample 0 of a frame);
// pairs then follow back to back. Outputs: a+b then a-b, one per cycle.
// out_sync marks a+b and comes LAT_R2 = 2 cycles after in_sync.
// Arithmetic wraps at W bits (no word growth).
module bf_r2 #(
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

  logic ph_q, ph;                       // 0: first sample of a pair, 1: second
  logic s0, s1;
  logic signed [W-1:0] a, b, c, d, e, f, g, h;
  logic [1:0] sync_q;

  assign ph = in_sync ? 1'b0 : ph_q;
  assign s0 = ph;
  assign s1 = ~ph;

  always_ff @(posedge clk) begin
    if (rst) begin
      ph_q   <= 1'b0;
      sync_q <= '0;
      a      <= '0;
      c      <= '0;
      g      <= '0;
      out_re <= '0;
    end else begin
      ph_q   <= ~ph;
      sync_q <= {sync_q[0], in_sync};
      a      <= in_im;                 // A: imaginary part, one cycle late
      c      <= b;                     // C
      g      <= f;                     // G
      out_re <= h;                     // R_out register
    end
  end

  always_comb begin
    b      = s0 ? a : in_re;
    d      = s0 ? in_re : a;
    e      = c + d;
    f      = c - d;
    h      = s1 ? g : e;
    out_im = s1 ? e : g;
  end

  assign out_sync = sync_q[1];

endmodule
