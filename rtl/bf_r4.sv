// Serial radix-4 butterfly: one complex sample per cycle in and out, four real
// adders, no multiplier, all adders busy every cycle.
//
// The 4-point DFT is computed in two add/subtract stages. The rotation by -j
// between them is trivial: it is done by pairing the real word of one operand
// with the imaginary word of the other, with no multiplier:
//   stage 1: a0 = x0 + x2, a2 = x0 - x2, a1 = x1 + x3, d = x1 - x3
//   stage 2: X0 = a0 + a1, X2 = a0 - a1, X1 = a2 - j d, X3 = a2 + j d
// Stage 1 (select S0) can only combine consecutive samples, because its
// operand register is one word deep. The butterfly therefore takes its input
// in the order x0, x2, x1, x3. The differences of stage 1 are held and reordered
// in a one-word hold register (S1) and a bypass multiplexer (S2). A
// rail exchange (S3) with a two-word register pairs the operands of stage 2 two
// cycles apart. The output exchange (S4, S5) assembles complex samples. The
// results leave in the order X0, X2, X1, X3, as in the published flow graph.
// Node names A..T, the ten multiplexers and eight registers follow the published
// serial radix-4 butterfly. The select sequences and the input order are
// derived here. Per phase 0..3 of the sample at the input:
//   S0=0101 S1=0111 S2=1000 S3=1001 S4=0010 S5=1010.
//
// Interface: in_sync marks x0; frames of four follow back to back. out_sync
// marks X0 and comes 4 cycles after in_sync. Arithmetic wraps at W bits.
module bf_r4 #(
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

  logic [1:0] ph_q, ph;
  logic s0, s1, s2, s3, s4, s5;
  logic [3:0] sync_q;
  logic signed [W-1:0] a, b, c, d, e, f, g, h, i, j, k, l1, l2, m, n, o, p, q, r, t;

  assign ph = in_sync ? 2'd0 : ph_q;

  always_comb begin
    s0 = ph[0];
    s1 = (ph != 2'd0);
    s2 = (ph == 2'd0);
    s3 = (ph == 2'd0) || (ph == 2'd3);
    s4 = (ph == 2'd2);
    s5 = ~ph[0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ph_q   <= '0;
      sync_q <= '0;
      a      <= '0;
      c      <= '0;
      h      <= '0;
      j      <= '0;
      l1     <= '0;
      l2     <= '0;
      r      <= '0;
      out_re <= '0;
    end else begin
      ph_q   <= ph + 2'd1;
      sync_q <= {sync_q[2:0], in_sync};
      a      <= in_im;
      c      <= b;
      h      <= g;
      j      <= i;
      l1     <= k;
      l2     <= l1;
      r      <= q;
      out_re <= t;
    end
  end

  always_comb begin
    // Stage 1.
    b = s0 ? a : in_re;
    d = s0 ? in_re : a;
    e = c + d;
    f = c - d;
    // Hold register and bypass for the differences.
    g = s1 ? f : h;
    i = s2 ? f : h;
    // Rail exchange, two-word delay on the upper rail.
    k = s3 ? j : e;
    m = s3 ? e : j;
    // Stage 2.
    n = l2 + m;
    o = l2 - m;
    // Output exchange.
    p      = s4 ? o : n;
    q      = s4 ? n : o;
    t      = s5 ? r : p;
    out_im = s5 ? p : r;
  end

  assign out_sync = sync_q[3];

endmodule
