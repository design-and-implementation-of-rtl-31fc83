// End-to-end test of the top level with default parameters: the 30-, 15- and
// 6-point FFTs and the radix-4 butterfly run at the same time on random frames, back to back, then after
// an idle gap that breaks the frame rhythm, and again back to back. Every
// output sample is compared with a double-precision DFT, every frame's latency
// is checked (37, 21, 8, 4 cycles), and every serial permutation circuit must
// have swapped samples at least once.
module tb_np2_fft_top;
  import np2_fft_pkg::*;
  localparam int W = DATA_W;
  localparam real PI = 3.14159265358979323846;

  localparam int NF = 12, NF1 = 6;
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
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- fft30 ----------------
  localparam int f30_N = 30, f30_LAT = 37, f30_TOL = 24, f30_AMP = 450;
  localparam int f30_IN_ORD [30]  = '{0, 6, 12, 18, 24, 10, 16, 22, 28, 4, 20, 26, 2, 8, 14, 15, 21, 27, 3, 9, 25, 1, 7, 13, 19, 5, 11, 17, 23, 29};   // input position -> time index n
  localparam int f30_OUT_ORD [30] = '{0, 15, 10, 25, 20, 5, 6, 21, 16, 1, 26, 11, 12, 27, 22, 7, 2, 17, 18, 3, 28, 13, 8, 23, 24, 9, 4, 19, 14, 29};  // output position -> frequency index K
  logic                f30_in_sync, f30_out_sync;
  logic signed [W-1:0] f30_in_re, f30_in_im, f30_out_re, f30_out_im;
  real    f30_ref_re [NF][30], f30_ref_im [NF][30];
  int     f30_xr [NF][30], f30_xi [NF][30];
  int     f30_sync_time [$];
  int     f30_of = 0, f30_opos = -1, f30_frames_ok = 0, f30_b2b = 0, f30_resync = 0;
  int     f30_maxerr = 0;

  // Make frame f: random samples and the exact DFT (independent reference).
  task automatic f30_make(int f);
    for (int n = 0; n < f30_N; n++) begin
      f30_xr[f][n] = $urandom_range(2*f30_AMP) - f30_AMP;
      f30_xi[f][n] = $urandom_range(2*f30_AMP) - f30_AMP;
    end
    if (f == 0) for (int n = 0; n < f30_N; n++) begin  // full-scale impulse-like frame
      f30_xr[f][n] = (n == 0) ? f30_AMP * 2 : 0;
      f30_xi[f][n] = (n == 1) ? -f30_AMP : 0;
    end
    for (int k = 0; k < f30_N; k++) begin
      real sr = 0.0, si = 0.0;
      for (int n = 0; n < f30_N; n++) begin
        real ang = -2.0 * PI * real'(n * k) / real'(f30_N);
        sr += real'(f30_xr[f][n]) * $cos(ang) - real'(f30_xi[f][n]) * $sin(ang);
        si += real'(f30_xr[f][n]) * $sin(ang) + real'(f30_xi[f][n]) * $cos(ang);
      end
      f30_ref_re[f][k] = sr;
      f30_ref_im[f][k] = si;
    end
  endtask

  // Drive: NF1 frames back to back, an idle gap that breaks the frame rhythm,
  // then the remaining frames back to back again.
  initial begin
    f30_in_sync = 0; f30_in_re = 0; f30_in_im = 0;
    for (int f = 0; f < NF; f++) f30_make(f);
    @(negedge clk iff !rst);
    repeat (3) @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      if (f == NF1) begin
        f30_in_sync = 0; f30_in_re = 0; f30_in_im = 0;
        repeat (f30_LAT + 3) @(negedge clk);
      end
      for (int q = 0; q < f30_N; q++) begin
        f30_in_sync = (q == 0);
        f30_in_re   = W'(f30_xr[f][f30_IN_ORD[q]]);
        f30_in_im   = W'(f30_xi[f][f30_IN_ORD[q]]);
        @(negedge clk);
      end
    end
    f30_in_sync = 0; f30_in_re = 0; f30_in_im = 0;
  end

  // Check: latency of every frame and every output sample against the reference.
  always @(posedge clk) if (!rst) begin
    if (f30_in_sync) f30_sync_time.push_back(cyc);
    if (f30_out_sync) begin
      int t0;
      checks++;
      t0 = f30_sync_time.pop_front();
      if (cyc - t0 != f30_LAT) begin
        failures++;
        $display("fft30: frame %0d latency %0d, expected %0d", f30_of, cyc - t0, f30_LAT);
      end
      if (f30_opos >= 0 && f30_opos != f30_N) begin
        failures++;
        $display("fft30: frame %0d started before the previous one ended", f30_of);
      end
      if (f30_opos == f30_N) f30_b2b++;
      if (f30_of == NF1) f30_resync++;
      f30_opos = 0;
    end
    if (f30_opos >= 0 && f30_opos < f30_N) begin
      real er, ei;
      int  k;
      k  = f30_OUT_ORD[f30_opos];
      er = real'(f30_out_re) - f30_ref_re[f30_of][k];
      ei = real'(f30_out_im) - f30_ref_im[f30_of][k];
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      if (int'(er) > f30_maxerr) f30_maxerr = int'(er);
      if (int'(ei) > f30_maxerr) f30_maxerr = int'(ei);
      checks++;
      if (er > real'(f30_TOL) + 0.001 || ei > real'(f30_TOL) + 0.001) begin
        failures++;
        if (failures < 20)
          $display("fft30: frame %0d pos %0d X[%0d] got (%0d,%0d) want (%0.1f,%0.1f)",
                   f30_of, f30_opos, k, f30_out_re, f30_out_im, f30_ref_re[f30_of][k], f30_ref_im[f30_of][k]);
      end
      f30_opos++;
      if (f30_opos == f30_N) begin
        f30_frames_ok++;
        f30_of++;
      end
    end else if (f30_opos == f30_N && !f30_out_sync) begin
      f30_opos = -1;   // gap between output frames
    end
  end

  // ---------------- fft15 ----------------
  localparam int f15_N = 15, f15_LAT = 21, f15_TOL = 16, f15_AMP = 800;
  localparam int f15_IN_ORD [15]  = '{0, 3, 6, 9, 12, 10, 13, 1, 4, 7, 5, 8, 11, 14, 2};   // input position -> time index n
  localparam int f15_OUT_ORD [15] = '{0, 5, 10, 6, 11, 1, 12, 2, 7, 3, 8, 13, 9, 14, 4};  // output position -> frequency index K
  logic                f15_in_sync, f15_out_sync;
  logic signed [W-1:0] f15_in_re, f15_in_im, f15_out_re, f15_out_im;
  real    f15_ref_re [NF][15], f15_ref_im [NF][15];
  int     f15_xr [NF][15], f15_xi [NF][15];
  int     f15_sync_time [$];
  int     f15_of = 0, f15_opos = -1, f15_frames_ok = 0, f15_b2b = 0, f15_resync = 0;
  int     f15_maxerr = 0;

  // Make frame f: random samples and the exact DFT (independent reference).
  task automatic f15_make(int f);
    for (int n = 0; n < f15_N; n++) begin
      f15_xr[f][n] = $urandom_range(2*f15_AMP) - f15_AMP;
      f15_xi[f][n] = $urandom_range(2*f15_AMP) - f15_AMP;
    end
    if (f == 0) for (int n = 0; n < f15_N; n++) begin  // full-scale impulse-like frame
      f15_xr[f][n] = (n == 0) ? f15_AMP * 2 : 0;
      f15_xi[f][n] = (n == 1) ? -f15_AMP : 0;
    end
    for (int k = 0; k < f15_N; k++) begin
      real sr = 0.0, si = 0.0;
      for (int n = 0; n < f15_N; n++) begin
        real ang = -2.0 * PI * real'(n * k) / real'(f15_N);
        sr += real'(f15_xr[f][n]) * $cos(ang) - real'(f15_xi[f][n]) * $sin(ang);
        si += real'(f15_xr[f][n]) * $sin(ang) + real'(f15_xi[f][n]) * $cos(ang);
      end
      f15_ref_re[f][k] = sr;
      f15_ref_im[f][k] = si;
    end
  endtask

  // Drive: NF1 frames back to back, an idle gap that breaks the frame rhythm,
  // then the remaining frames back to back again.
  initial begin
    f15_in_sync = 0; f15_in_re = 0; f15_in_im = 0;
    for (int f = 0; f < NF; f++) f15_make(f);
    @(negedge clk iff !rst);
    repeat (3) @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      if (f == NF1) begin
        f15_in_sync = 0; f15_in_re = 0; f15_in_im = 0;
        repeat (f15_LAT + 3) @(negedge clk);
      end
      for (int q = 0; q < f15_N; q++) begin
        f15_in_sync = (q == 0);
        f15_in_re   = W'(f15_xr[f][f15_IN_ORD[q]]);
        f15_in_im   = W'(f15_xi[f][f15_IN_ORD[q]]);
        @(negedge clk);
      end
    end
    f15_in_sync = 0; f15_in_re = 0; f15_in_im = 0;
  end

  // Check: latency of every frame and every output sample against the reference.
  always @(posedge clk) if (!rst) begin
    if (f15_in_sync) f15_sync_time.push_back(cyc);
    if (f15_out_sync) begin
      int t0;
      checks++;
      t0 = f15_sync_time.pop_front();
      if (cyc - t0 != f15_LAT) begin
        failures++;
        $display("fft15: frame %0d latency %0d, expected %0d", f15_of, cyc - t0, f15_LAT);
      end
      if (f15_opos >= 0 && f15_opos != f15_N) begin
        failures++;
        $display("fft15: frame %0d started before the previous one ended", f15_of);
      end
      if (f15_opos == f15_N) f15_b2b++;
      if (f15_of == NF1) f15_resync++;
      f15_opos = 0;
    end
    if (f15_opos >= 0 && f15_opos < f15_N) begin
      real er, ei;
      int  k;
      k  = f15_OUT_ORD[f15_opos];
      er = real'(f15_out_re) - f15_ref_re[f15_of][k];
      ei = real'(f15_out_im) - f15_ref_im[f15_of][k];
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      if (int'(er) > f15_maxerr) f15_maxerr = int'(er);
      if (int'(ei) > f15_maxerr) f15_maxerr = int'(ei);
      checks++;
      if (er > real'(f15_TOL) + 0.001 || ei > real'(f15_TOL) + 0.001) begin
        failures++;
        if (failures < 20)
          $display("fft15: frame %0d pos %0d X[%0d] got (%0d,%0d) want (%0.1f,%0.1f)",
                   f15_of, f15_opos, k, f15_out_re, f15_out_im, f15_ref_re[f15_of][k], f15_ref_im[f15_of][k]);
      end
      f15_opos++;
      if (f15_opos == f15_N) begin
        f15_frames_ok++;
        f15_of++;
      end
    end else if (f15_opos == f15_N && !f15_out_sync) begin
      f15_opos = -1;   // gap between output frames
    end
  end

  // ---------------- fft6 ----------------
  localparam int f6_N = 6, f6_LAT = 8, f6_TOL = 6, f6_AMP = 2000;
  localparam int f6_IN_ORD [6]  = '{0, 2, 4, 3, 5, 1};   // input position -> time index n
  localparam int f6_OUT_ORD [6] = '{0, 3, 4, 1, 2, 5};  // output position -> frequency index K
  logic                f6_in_sync, f6_out_sync;
  logic signed [W-1:0] f6_in_re, f6_in_im, f6_out_re, f6_out_im;
  real    f6_ref_re [NF][6], f6_ref_im [NF][6];
  int     f6_xr [NF][6], f6_xi [NF][6];
  int     f6_sync_time [$];
  int     f6_of = 0, f6_opos = -1, f6_frames_ok = 0, f6_b2b = 0, f6_resync = 0;
  int     f6_maxerr = 0;

  // Make frame f: random samples and the exact DFT (independent reference).
  task automatic f6_make(int f);
    for (int n = 0; n < f6_N; n++) begin
      f6_xr[f][n] = $urandom_range(2*f6_AMP) - f6_AMP;
      f6_xi[f][n] = $urandom_range(2*f6_AMP) - f6_AMP;
    end
    if (f == 0) for (int n = 0; n < f6_N; n++) begin  // full-scale impulse-like frame
      f6_xr[f][n] = (n == 0) ? f6_AMP * 2 : 0;
      f6_xi[f][n] = (n == 1) ? -f6_AMP : 0;
    end
    for (int k = 0; k < f6_N; k++) begin
      real sr = 0.0, si = 0.0;
      for (int n = 0; n < f6_N; n++) begin
        real ang = -2.0 * PI * real'(n * k) / real'(f6_N);
        sr += real'(f6_xr[f][n]) * $cos(ang) - real'(f6_xi[f][n]) * $sin(ang);
        si += real'(f6_xr[f][n]) * $sin(ang) + real'(f6_xi[f][n]) * $cos(ang);
      end
      f6_ref_re[f][k] = sr;
      f6_ref_im[f][k] = si;
    end
  endtask

  // Drive: NF1 frames back to back, an idle gap that breaks the frame rhythm,
  // then the remaining frames back to back again.
  initial begin
    f6_in_sync = 0; f6_in_re = 0; f6_in_im = 0;
    for (int f = 0; f < NF; f++) f6_make(f);
    @(negedge clk iff !rst);
    repeat (3) @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      if (f == NF1) begin
        f6_in_sync = 0; f6_in_re = 0; f6_in_im = 0;
        repeat (f6_LAT + 3) @(negedge clk);
      end
      for (int q = 0; q < f6_N; q++) begin
        f6_in_sync = (q == 0);
        f6_in_re   = W'(f6_xr[f][f6_IN_ORD[q]]);
        f6_in_im   = W'(f6_xi[f][f6_IN_ORD[q]]);
        @(negedge clk);
      end
    end
    f6_in_sync = 0; f6_in_re = 0; f6_in_im = 0;
  end

  // Check: latency of every frame and every output sample against the reference.
  always @(posedge clk) if (!rst) begin
    if (f6_in_sync) f6_sync_time.push_back(cyc);
    if (f6_out_sync) begin
      int t0;
      checks++;
      t0 = f6_sync_time.pop_front();
      if (cyc - t0 != f6_LAT) begin
        failures++;
        $display("fft6: frame %0d latency %0d, expected %0d", f6_of, cyc - t0, f6_LAT);
      end
      if (f6_opos >= 0 && f6_opos != f6_N) begin
        failures++;
        $display("fft6: frame %0d started before the previous one ended", f6_of);
      end
      if (f6_opos == f6_N) f6_b2b++;
      if (f6_of == NF1) f6_resync++;
      f6_opos = 0;
    end
    if (f6_opos >= 0 && f6_opos < f6_N) begin
      real er, ei;
      int  k;
      k  = f6_OUT_ORD[f6_opos];
      er = real'(f6_out_re) - f6_ref_re[f6_of][k];
      ei = real'(f6_out_im) - f6_ref_im[f6_of][k];
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      if (int'(er) > f6_maxerr) f6_maxerr = int'(er);
      if (int'(ei) > f6_maxerr) f6_maxerr = int'(ei);
      checks++;
      if (er > real'(f6_TOL) + 0.001 || ei > real'(f6_TOL) + 0.001) begin
        failures++;
        if (failures < 20)
          $display("fft6: frame %0d pos %0d X[%0d] got (%0d,%0d) want (%0.1f,%0.1f)",
                   f6_of, f6_opos, k, f6_out_re, f6_out_im, f6_ref_re[f6_of][k], f6_ref_im[f6_of][k]);
      end
      f6_opos++;
      if (f6_opos == f6_N) begin
        f6_frames_ok++;
        f6_of++;
      end
    end else if (f6_opos == f6_N && !f6_out_sync) begin
      f6_opos = -1;   // gap between output frames
    end
  end

  // ---------------- bf_r4 ----------------
  localparam int f4_N = 4, f4_LAT = 4, f4_TOL = 0, f4_AMP = 4000;
  localparam int f4_IN_ORD [4]  = '{0, 2, 1, 3};   // input position -> time index n
  localparam int f4_OUT_ORD [4] = '{0, 2, 1, 3};  // output position -> frequency index K
  logic                f4_in_sync, f4_out_sync;
  logic signed [W-1:0] f4_in_re, f4_in_im, f4_out_re, f4_out_im;
  real    f4_ref_re [NF][4], f4_ref_im [NF][4];
  int     f4_xr [NF][4], f4_xi [NF][4];
  int     f4_sync_time [$];
  int     f4_of = 0, f4_opos = -1, f4_frames_ok = 0, f4_b2b = 0, f4_resync = 0;
  int     f4_maxerr = 0;

  // Make frame f: random samples and the exact DFT (independent reference).
  task automatic f4_make(int f);
    for (int n = 0; n < f4_N; n++) begin
      f4_xr[f][n] = $urandom_range(2*f4_AMP) - f4_AMP;
      f4_xi[f][n] = $urandom_range(2*f4_AMP) - f4_AMP;
    end
    if (f == 0) for (int n = 0; n < f4_N; n++) begin  // full-scale impulse-like frame
      f4_xr[f][n] = (n == 0) ? f4_AMP * 2 : 0;
      f4_xi[f][n] = (n == 1) ? -f4_AMP : 0;
    end
    for (int k = 0; k < f4_N; k++) begin
      real sr = 0.0, si = 0.0;
      for (int n = 0; n < f4_N; n++) begin
        real ang = -2.0 * PI * real'(n * k) / real'(f4_N);
        sr += real'(f4_xr[f][n]) * $cos(ang) - real'(f4_xi[f][n]) * $sin(ang);
        si += real'(f4_xr[f][n]) * $sin(ang) + real'(f4_xi[f][n]) * $cos(ang);
      end
      f4_ref_re[f][k] = sr;
      f4_ref_im[f][k] = si;
    end
  endtask

  // Drive: NF1 frames back to back, an idle gap that breaks the frame rhythm,
  // then the remaining frames back to back again.
  initial begin
    f4_in_sync = 0; f4_in_re = 0; f4_in_im = 0;
    for (int f = 0; f < NF; f++) f4_make(f);
    @(negedge clk iff !rst);
    repeat (3) @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      if (f == NF1) begin
        f4_in_sync = 0; f4_in_re = 0; f4_in_im = 0;
        repeat (f4_LAT + 3) @(negedge clk);
      end
      for (int q = 0; q < f4_N; q++) begin
        f4_in_sync = (q == 0);
        f4_in_re   = W'(f4_xr[f][f4_IN_ORD[q]]);
        f4_in_im   = W'(f4_xi[f][f4_IN_ORD[q]]);
        @(negedge clk);
      end
    end
    f4_in_sync = 0; f4_in_re = 0; f4_in_im = 0;
  end

  // Check: latency of every frame and every output sample against the reference.
  always @(posedge clk) if (!rst) begin
    if (f4_in_sync) f4_sync_time.push_back(cyc);
    if (f4_out_sync) begin
      int t0;
      checks++;
      t0 = f4_sync_time.pop_front();
      if (cyc - t0 != f4_LAT) begin
        failures++;
        $display("bf_r4: frame %0d latency %0d, expected %0d", f4_of, cyc - t0, f4_LAT);
      end
      if (f4_opos >= 0 && f4_opos != f4_N) begin
        failures++;
        $display("bf_r4: frame %0d started before the previous one ended", f4_of);
      end
      if (f4_opos == f4_N) f4_b2b++;
      if (f4_of == NF1) f4_resync++;
      f4_opos = 0;
    end
    if (f4_opos >= 0 && f4_opos < f4_N) begin
      real er, ei;
      int  k;
      k  = f4_OUT_ORD[f4_opos];
      er = real'(f4_out_re) - f4_ref_re[f4_of][k];
      ei = real'(f4_out_im) - f4_ref_im[f4_of][k];
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      if (int'(er) > f4_maxerr) f4_maxerr = int'(er);
      if (int'(ei) > f4_maxerr) f4_maxerr = int'(ei);
      checks++;
      if (er > real'(f4_TOL) + 0.001 || ei > real'(f4_TOL) + 0.001) begin
        failures++;
        if (failures < 20)
          $display("bf_r4: frame %0d pos %0d X[%0d] got (%0d,%0d) want (%0.1f,%0.1f)",
                   f4_of, f4_opos, k, f4_out_re, f4_out_im, f4_ref_re[f4_of][k], f4_ref_im[f4_of][k]);
      end
      f4_opos++;
      if (f4_opos == f4_N) begin
        f4_frames_ok++;
        f4_of++;
      end
    end else if (f4_opos == f4_N && !f4_out_sync) begin
      f4_opos = -1;   // gap between output frames
    end
  end

  // Swap events of every serial permutation circuit.
  localparam int NSW = 13;
  int swaps [NSW];
  initial for (int i = 0; i < NSW; i++) swaps[i] = 0;
  always @(posedge clk) if (!rst) begin
    if (dut.u_fft30.u_perm53.g_stage[0].u_cell.sel) swaps[0]++;
    if (dut.u_fft30.u_perm53.g_stage[1].u_cell.sel) swaps[1]++;
    if (dut.u_fft30.u_perm53.g_stage[2].u_cell.sel) swaps[2]++;
    if (dut.u_fft30.u_perm53.g_stage[3].u_cell.sel) swaps[3]++;
    if (dut.u_fft30.u_perm53.g_stage[4].u_cell.sel) swaps[4]++;
    if (dut.u_fft30.u_perm53.g_stage[5].u_cell.sel) swaps[5]++;
    if (dut.u_fft30.u_perm32.g_stage[0].u_cell.sel) swaps[6]++;
    if (dut.u_fft30.u_perm32.g_stage[1].u_cell.sel) swaps[7]++;
    if (dut.u_fft15.u_perm.g_stage[0].u_cell.sel) swaps[8]++;
    if (dut.u_fft15.u_perm.g_stage[1].u_cell.sel) swaps[9]++;
    if (dut.u_fft15.u_perm.g_stage[2].u_cell.sel) swaps[10]++;
    if (dut.u_fft6.u_perm.g_stage[0].u_cell.sel) swaps[11]++;
    if (dut.u_fft6.u_perm.g_stage[1].u_cell.sel) swaps[12]++;
  end

  np2_fft_top dut (
    .clk, .rst,
    .f30_in_sync, .f30_in_re, .f30_in_im, .f30_out_sync, .f30_out_re, .f30_out_im,
    .f15_in_sync, .f15_in_re, .f15_in_im, .f15_out_sync, .f15_out_re, .f15_out_im,
    .f6_in_sync,  .f6_in_re,  .f6_in_im,  .f6_out_sync,  .f6_out_re,  .f6_out_im,
    .f4_in_sync,  .f4_in_re,  .f4_in_im,  .f4_out_sync,  .f4_out_re,  .f4_out_im
  );

  initial begin
    wait (f30_frames_ok == NF && f15_frames_ok == NF && f6_frames_ok == NF && f4_frames_ok == NF);
    repeat (5) @(posedge clk);

    checks++;
    if (f30_frames_ok != NF) begin failures++; $display("fft30: %0d of %0d frames seen", f30_frames_ok, NF); end
    checks++;
    if (f30_b2b == 0) begin failures++; $display("fft30: no back-to-back frames"); end
    checks++;
    if (f30_resync == 0) begin failures++; $display("fft30: no re-alignment after a gap"); end
    $display("fft30: frames=%0d back_to_back=%0d realign=%0d max_error=%0d LSB",
             f30_frames_ok, f30_b2b, f30_resync, f30_maxerr);

    checks++;
    if (f15_frames_ok != NF) begin failures++; $display("fft15: %0d of %0d frames seen", f15_frames_ok, NF); end
    checks++;
    if (f15_b2b == 0) begin failures++; $display("fft15: no back-to-back frames"); end
    checks++;
    if (f15_resync == 0) begin failures++; $display("fft15: no re-alignment after a gap"); end
    $display("fft15: frames=%0d back_to_back=%0d realign=%0d max_error=%0d LSB",
             f15_frames_ok, f15_b2b, f15_resync, f15_maxerr);

    checks++;
    if (f6_frames_ok != NF) begin failures++; $display("fft6: %0d of %0d frames seen", f6_frames_ok, NF); end
    checks++;
    if (f6_b2b == 0) begin failures++; $display("fft6: no back-to-back frames"); end
    checks++;
    if (f6_resync == 0) begin failures++; $display("fft6: no re-alignment after a gap"); end
    $display("fft6: frames=%0d back_to_back=%0d realign=%0d max_error=%0d LSB",
             f6_frames_ok, f6_b2b, f6_resync, f6_maxerr);

    checks++;
    if (f4_frames_ok != NF) begin failures++; $display("bf_r4: %0d of %0d frames seen", f4_frames_ok, NF); end
    checks++;
    if (f4_b2b == 0) begin failures++; $display("bf_r4: no back-to-back frames"); end
    checks++;
    if (f4_resync == 0) begin failures++; $display("bf_r4: no re-alignment after a gap"); end
    $display("bf_r4: frames=%0d back_to_back=%0d realign=%0d max_error=%0d LSB",
             f4_frames_ok, f4_b2b, f4_resync, f4_maxerr);

    for (int i = 0; i < NSW; i++) begin
      checks++;
      if (swaps[i] == 0) begin
        failures++;
        $display("permutation circuit %0d never swapped", i);
      end
    end
    $display("swap events per permutation circuit (30-pt: 8, 15-pt: 3, 6-pt: 2):");
    for (int i = 0; i < NSW; i++) $display("  circuit %0d: %0d", i, swaps[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
