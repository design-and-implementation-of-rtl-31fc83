// Self-checking test of the serial radix-2 butterfly: random frames in natural order, compared with a double-precision
// DFT (tolerance 0 LSB per component), latency 2 cycles checked on every frame,
// back-to-back frames and re-alignment after an idle gap.
module tb_bf_r2;
  import np2_fft_pkg::*;
  localparam int W = DATA_W;
  localparam real PI = 3.14159265358979323846;

  localparam int NF = 8, NF1 = 4;
  logic clk = 0, rst = 1;
  int   cyc = 0, checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
  end
  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- bf_r2 ----------------
  localparam int N = 2, LAT = 2, TOL = 0, AMP = 7000;
  localparam int IN_ORD [2]  = '{0, 1};   // input position -> time index n
  localparam int OUT_ORD [2] = '{0, 1};  // output position -> frequency index K
  logic                in_sync, out_sync;
  logic signed [W-1:0] in_re, in_im, out_re, out_im;
  real    ref_re [NF][2], ref_im [NF][2];
  int     xr [NF][2], xi [NF][2];
  int     sync_time [$];
  int     of = 0, opos = -1, frames_ok = 0, b2b = 0, resync = 0;
  int     maxerr = 0;

  // Make frame f: random samples and the exact DFT (independent reference).
  task automatic make(int f);
    for (int n = 0; n < N; n++) begin
      xr[f][n] = $urandom_range(2*AMP) - AMP;
      xi[f][n] = $urandom_range(2*AMP) - AMP;
    end
    if (f == 0) for (int n = 0; n < N; n++) begin  // full-scale impulse-like frame
      xr[f][n] = (n == 0) ? AMP * 2 : 0;
      xi[f][n] = (n == 1) ? -AMP : 0;
    end
    for (int k = 0; k < N; k++) begin
      real sr = 0.0, si = 0.0;
      for (int n = 0; n < N; n++) begin
        real ang = -2.0 * PI * real'(n * k) / real'(N);
        sr += real'(xr[f][n]) * $cos(ang) - real'(xi[f][n]) * $sin(ang);
        si += real'(xr[f][n]) * $sin(ang) + real'(xi[f][n]) * $cos(ang);
      end
      ref_re[f][k] = sr;
      ref_im[f][k] = si;
    end
  endtask

  // Drive: NF1 frames back to back, an idle gap that breaks the frame rhythm,
  // then the remaining frames back to back again.
  initial begin
    in_sync = 0; in_re = 0; in_im = 0;
    for (int f = 0; f < NF; f++) make(f);
    @(negedge clk iff !rst);
    repeat (3) @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      if (f == NF1) begin
        in_sync = 0; in_re = 0; in_im = 0;
        repeat (LAT + 3) @(negedge clk);
      end
      for (int q = 0; q < N; q++) begin
        in_sync = (q == 0);
        in_re   = W'(xr[f][IN_ORD[q]]);
        in_im   = W'(xi[f][IN_ORD[q]]);
        @(negedge clk);
      end
    end
    in_sync = 0; in_re = 0; in_im = 0;
  end

  // Check: latency of every frame and every output sample against the reference.
  always @(posedge clk) if (!rst) begin
    if (in_sync) sync_time.push_back(cyc);
    if (out_sync) begin
      int t0;
      checks++;
      t0 = sync_time.pop_front();
      if (cyc - t0 != LAT) begin
        failures++;
        $display("bf_r2: frame %0d latency %0d, expected %0d", of, cyc - t0, LAT);
      end
      if (opos >= 0 && opos != N) begin
        failures++;
        $display("bf_r2: frame %0d started before the previous one ended", of);
      end
      if (opos == N) b2b++;
      if (of == NF1) resync++;
      opos = 0;
    end
    if (opos >= 0 && opos < N) begin
      real er, ei;
      int  k;
      k  = OUT_ORD[opos];
      er = real'(out_re) - ref_re[of][k];
      ei = real'(out_im) - ref_im[of][k];
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      if (int'(er) > maxerr) maxerr = int'(er);
      if (int'(ei) > maxerr) maxerr = int'(ei);
      checks++;
      if (er > real'(TOL) + 0.001 || ei > real'(TOL) + 0.001) begin
        failures++;
        if (failures < 20)
          $display("bf_r2: frame %0d pos %0d X[%0d] got (%0d,%0d) want (%0.1f,%0.1f)",
                   of, opos, k, out_re, out_im, ref_re[of][k], ref_im[of][k]);
      end
      opos++;
      if (opos == N) begin
        frames_ok++;
        of++;
      end
    end else if (opos == N && !out_sync) begin
      opos = -1;   // gap between output frames
    end
  end

  bf_r2 dut (
    .clk, .rst, .in_sync, .in_re, .in_im, .out_sync, .out_re, .out_im
  );

  initial begin
    wait (frames_ok == NF);
    repeat (5) @(posedge clk);

    checks++;
    if (frames_ok != NF) begin failures++; $display("bf_r2: %0d of %0d frames seen", frames_ok, NF); end
    checks++;
    if (b2b == 0) begin failures++; $display("bf_r2: no back-to-back frames"); end
    checks++;
    if (resync == 0) begin failures++; $display("bf_r2: no re-alignment after a gap"); end
    $display("bf_r2: frames=%0d back_to_back=%0d realign=%0d max_error=%0d LSB",
             frames_ok, b2b, resync, maxerr);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
