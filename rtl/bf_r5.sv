// Serial radix-5 butterfly: one complex sample per cycle in and out, with two
// real multipliers that are busy in four of the five cycles of a frame.
//
// It computes the 5-point DFT with the Winograd-style flow graph of the
// published radix-5 butterfly (constants K1..K5, see np2_fft_pkg):
//   a1 = x1 + x4, a2 = x2 + x3, b1 = x1 - x4, b2 = x2 - x3,
//   c1 = a1 + a2, c2 = a1 - a2, e = b1 + b2,
//   X0 = x0 + c1, d1 = x0 + K1 c1, d2 = K2 c2,
//   h4 = j (K3 b1 + K4 e), h5 = j (K5 b2 + K4 e),
//   X1 = d1 + d2 + h4, X4 = d1 + d2 - h4, X2 = d1 - d2 + h5, X3 = d1 - d2 - h5.
// The flow graph, its constants and the count of two real multipliers follow
// the published butterfly. Its shared-adder circuit is not reproduced: the
// schedule below is this design's own. A 4-sample input shift register and a
// frame register collect one frame. The two real multipliers (one for the real
// word, one for the imaginary word) compute one real-by-complex product per
// cycle, in the phases of the next frame:
//   phase 0: K2 c2, phase 1: K4 e, phase 2: K3 b1, phase 3: K5 b2.
// The three earlier products wait in registers. In phase 3, d1, d2, h4 and h5 are
// latched into hold registers and X0 is sent. One output adder path then forms
// X1, X2, X3 and X4 from the hold registers in the next four cycles. K1 = -1/4 is
// an arithmetic shift by two. The column adders are not shared.
//
// Interface: in_sync marks x0; frames of five follow back to back. Outputs
// X0..X4 in consecutive cycles, out_sync marks X0. The first output comes
// LAT_R5 = 9 cycles after the first input. That is the butterfly latency
// implied by the published latencies of the 15- and 30-point architectures.
// Arithmetic wraps at W bits; products are truncated.
module bf_r5 #(
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

  typedef struct packed {
    logic signed [W-1:0] re;
    logic signed [W-1:0] im;
  } cpx_t;

  function automatic cpx_t add(cpx_t p, cpx_t q);
    return '{re: p.re + q.re, im: p.im + q.im};
  endfunction

  function automatic cpx_t sub(cpx_t p, cpx_t q);
    return '{re: p.re - q.re, im: p.im - q.im};
  endfunction

  // Multiplication by j.
  function automatic cpx_t rot_j(cpx_t p);
    return '{re: -p.im, im: p.re};
  endfunction

  logic [2:0] ph_q, ph;
  logic [LAT_R5-1:0] sync_q;
  cpx_t x_in;
  cpx_t hist [4];                       // last four input samples
  cpx_t frm [5];                        // collected frame x0..x4
  cpx_t a1, a2, b1, b2, c1, c2, e, x0_sum, d1;
  cpx_t m_op, m_res;                    // shared multiplier operand and product
  logic signed [COEF_W-1:0] m_coef;
  logic signed [W+COEF_W-1:0] m_pr, m_pi;
  cpx_t p_k2c2, p_k4e, p_k3b1;          // products waiting for phase 3
  cpx_t hd1, hd2, hh4, hh5;             // hold registers of one frame
  cpx_t o_sum, o_next;
  cpx_t out_q;

  assign ph   = in_sync ? 3'd0 : ph_q;
  assign x_in = '{re: in_re, im: in_im};

  always_comb begin
    // Column adders, from the frame register.
    a1     = add(frm[1], frm[4]);
    a2     = add(frm[2], frm[3]);
    b1     = sub(frm[1], frm[4]);
    b2     = sub(frm[2], frm[3]);
    c1     = add(a1, a2);
    c2     = sub(a1, a2);
    e      = add(b1, b2);
    x0_sum = add(frm[0], c1);
    d1     = sub(frm[0], '{re: c1.re >>> 2, im: c1.im >>> 2});
    // Two real multipliers, operand and constant chosen by the phase.
    unique case (ph)
      3'd0:    begin m_op = c2; m_coef = C5_K2; end
      3'd1:    begin m_op = e;  m_coef = C5_K4; end
      3'd2:    begin m_op = b1; m_coef = C5_K3; end
      default: begin m_op = b2; m_coef = C5_K5; end
    endcase
    m_pr  = m_op.re * m_coef;
    m_pi  = m_op.im * m_coef;
    m_res = '{re: W'(m_pr >>> COEF_FRAC), im: W'(m_pi >>> COEF_FRAC)};
    // Output path: X1 and X4 use d1 + d2 and h4, X2 and X3 use d1 - d2 and h5.
    if (ph == 3'd4 || ph == 3'd2) o_sum = add(hd1, hd2);
    else                          o_sum = sub(hd1, hd2);
    unique case (ph)
      3'd3:    o_next = x0_sum;            // X0
      3'd4:    o_next = add(o_sum, hh4);   // X1
      3'd0:    o_next = add(o_sum, hh5);   // X2
      3'd1:    o_next = sub(o_sum, hh5);   // X3
      default: o_next = sub(o_sum, hh4);   // X4
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ph_q   <= '0;
      sync_q <= '0;
      for (int i = 0; i < 4; i++) hist[i] <= '0;
      for (int i = 0; i < 5; i++) frm[i] <= '0;
      {p_k2c2, p_k4e, p_k3b1}  <= '0;
      {hd1, hd2, hh4, hh5}     <= '0;
      out_q  <= '0;
    end else begin
      ph_q   <= (ph == 3'd4) ? 3'd0 : ph + 3'd1;
      sync_q <= {sync_q[LAT_R5-2:0], in_sync};
      // Collect one frame.
      hist[0] <= x_in;
      for (int i = 1; i < 4; i++) hist[i] <= hist[i-1];
      if (ph == 3'd4) begin
        frm[0] <= hist[3];
        frm[1] <= hist[2];
        frm[2] <= hist[1];
        frm[3] <= hist[0];
        frm[4] <= x_in;
      end
      // Products of the frame in the frame register.
      if (ph == 3'd0) p_k2c2 <= m_res;
      if (ph == 3'd1) p_k4e  <= m_res;
      if (ph == 3'd2) p_k3b1 <= m_res;
      if (ph == 3'd3) begin
        hd1 <= d1;
        hd2 <= p_k2c2;
        hh4 <= rot_j(add(p_k3b1, p_k4e));
        hh5 <= rot_j(add(m_res, p_k4e));
      end
      out_q <= o_next;
    end
  end

  assign out_re   = out_q.re;
  assign out_im   = out_q.im;
  assign out_sync = sync_q[LAT_R5-1];

endmodule
