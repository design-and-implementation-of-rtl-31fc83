// Serial radix-3 butterfly: one complex sample per cycle in and out, with six
// real adders and one real constant multiplier, all busy every cycle.
//
// For inputs x0, x1, x2 (cycles 0, 1, 2) it computes the 3-point DFT as
//   u = x1 + x2,  v = x1 - x2,
//   X0 = x0 + u,  y = x0 - u/2,
//   X1 = y - j(sqrt3/2) v,  X2 = y + j(sqrt3/2) v.
// The datapath is a chain of three add/subtract stages. Each stage has a pair
// of 2:1 multiplexers and registers that exchange words between the upper and
// lower rail. Gating elements force an adder operand to zero in the cycles
// where a word only passes through. Between stages, data move as real and
// imaginary words, not as complex samples:
//   stage 1 (S0, S1): u and v, x0 bypassed;
//   stage 2 (S2, S3): X0 and y (the u/2 term is an arithmetic shift), v bypassed;
//   stage 3 (S4, S5): y +/- (sqrt3/2) v through the single multiplier, X0 bypassed;
//   output exchange (S6, S7) reassembles X0, X1, X2 as complex samples.
// Signal names A..C' and the placement of the eight registers follow the
// published radix-3 serial butterfly. The select sequences are derived
// here; listed per phase (cycle of the frame mod 3) of the sample at the input:
//   S0=001 S1=101 S2=101 S3=101 S4=110 S5=011 S6=001 S7=001.
//
// Interface: in_sync marks x0 of a triple; triples then follow back to back.
// Outputs X0, X1, X2 in consecutive cycles; out_sync marks X0 and comes
// LAT_R3 = 4 cycles after in_sync. Arithmetic wraps at W bits; the constant
// product is truncated.
module bf_r3 #(
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

  logic [1:0] ph_q, ph;
  logic s0, s1, s2, s3, s4, s5, s6, s7;
  logic [3:0] sync_q;

  // Rails, named as in the published circuit.
  logic signed [W-1:0] a, b, c, d, e, f, h, i_q, j, k, l, o, n, p_d, p_q;
  logic signed [W-1:0] r, t, u, m, x, w, y, z, a2, b2, c2;
  logic signed [W+COEF_W-1:0] prod;
  localparam logic signed [W-1:0] ZERO = '0;

  assign ph = in_sync ? 2'd0 : ph_q;

  always_comb begin
    s0 = (ph == 2'd2);
    s1 = (ph != 2'd1);
    s2 = (ph != 2'd1);
    s3 = (ph != 2'd1);
    s4 = (ph != 2'd2);
    s5 = (ph != 2'd0);
    s6 = (ph == 2'd2);
    s7 = (ph == 2'd2);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ph_q   <= '0;
      sync_q <= '0;
      a      <= '0;
      c      <= '0;
      i_q    <= '0;
      k      <= '0;
      p_q    <= '0;
      t      <= '0;
      b2     <= '0;
      out_re <= '0;
    end else begin
      ph_q   <= (ph == 2'd2) ? 2'd0 : ph + 2'd1;
      sync_q <= {sync_q[2:0], in_sync};
      a      <= in_im;
      c      <= b;
      i_q    <= h;
      k      <= j;
      p_q    <= p_d;
      t      <= r;
      b2     <= a2;
      out_re <= c2;
    end
  end

  always_comb begin
    // Stage 1: x1 +/- x2, x0 passes through.
    b    = s0 ? a : in_re;
    d    = s0 ? in_re : a;
    e    = c + (s1 ? d : ZERO);
    f    = c - d;
    h    = s1 ? f : d;
    // Stage 2: x0 + u and x0 - u/2, v passes through.
    j    = s2 ? i_q : e;
    l    = s2 ? e : i_q;
    o    = (s3 ? k : ZERO) + l;
    n    = s3 ? (l >>> 1) : ZERO;
    p_d  = k - n;
    // Stage 3: y +/- (sqrt3/2) v, X0 passes through.
    r    = s4 ? p_q : o;
    u    = s4 ? o : p_q;
    prod = u * C3_SIN60;
    m    = W'(prod >>> COEF_FRAC);
    x    = t + (s5 ? m : ZERO);
    w    = t - m;
    y    = s5 ? w : u;
    // Output exchange.
    z      = s6 ? y : x;
    a2     = s6 ? x : y;
    c2     = s7 ? b2 : z;
    out_im = s7 ? z : b2;
  end

  assign out_sync = sync_q[3];

endmodule
