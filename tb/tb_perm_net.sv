// Self-checking test of the three permutation networks: tagged samples must
// leave in the next butterfly's input order (6 points: P0 -> P1 of the 6-point
// graph; 15/30 points: position R1*j+k -> (N/R1)*k+j) with latency 2, 8 and 20.
module tb_perm_net;
  import np2_fft_pkg::*;
  localparam int W = DATA_W;
  localparam int NF = 6, NF1 = 3;
  logic clk = 0, rst = 1;
  int   cyc = 0, checks = 0, failures = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- 6-point network ----------------
  localparam int n6_N = 6, n6_LAT = 2;
  // SRC[q]: input position whose sample must appear at output position q.
  localparam int n6_SRC [6] = '{0, 3, 1, 4, 2, 5};
  logic                n6_in_sync, n6_out_sync;
  logic signed [W-1:0] n6_in_re, n6_in_im, n6_out_re, n6_out_im;
  int n6_sync_time [$];
  int n6_of = 0, n6_opos = -1, n6_frames = 0, n6_b2b = 0;

  perm_net #(.W(W), .N(P6_N), .STAGES(P6_STAGES), .LEN(P6_LEN), .PAT(P6_PAT)) n6_dut (
    .clk, .rst, .in_sync(n6_in_sync), .in_re(n6_in_re), .in_im(n6_in_im),
    .out_sync(n6_out_sync), .out_re(n6_out_re), .out_im(n6_out_im)
  );

  // Each sample carries its frame and position as a tag.
  initial begin
    n6_in_sync = 0; n6_in_re = 0; n6_in_im = 0;
    @(negedge clk iff !rst);
    repeat (2) @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      if (f == NF1) begin
        n6_in_sync = 0; n6_in_re = -1; n6_in_im = -1;
        repeat (n6_LAT + 5) @(negedge clk);
      end
      for (int q = 0; q < n6_N; q++) begin
        n6_in_sync = (q == 0);
        n6_in_re   = W'(f * 100 + q);
        n6_in_im   = W'(-(f * 100 + q));
        @(negedge clk);
      end
    end
    n6_in_sync = 0; n6_in_re = -1; n6_in_im = -1;
  end

  always @(posedge clk) if (!rst) begin
    if (n6_in_sync) n6_sync_time.push_back(cyc);
    if (n6_out_sync) begin
      int t0;
      t0 = n6_sync_time.pop_front();
      checks++;
      if (cyc - t0 != n6_LAT) begin
        failures++;
        $display("6-point network: latency %0d, expected %0d", cyc - t0, n6_LAT);
      end
      if (n6_opos == n6_N) n6_b2b++;
      n6_opos = 0;
    end
    if (n6_opos >= 0 && n6_opos < n6_N) begin
      int want;
      want = n6_of * 100 + n6_SRC[n6_opos];
      checks++;
      if (int'(n6_out_re) != want || int'(n6_out_im) != -want) begin
        failures++;
        if (failures < 20)
          $display("6-point network: frame %0d pos %0d got %0d/%0d want %0d", n6_of, n6_opos, n6_out_re, n6_out_im, want);
      end
      n6_opos++;
      if (n6_opos == n6_N) begin
        n6_frames++;
        n6_of++;
      end
    end else if (n6_opos == n6_N && !n6_out_sync) n6_opos = -1;
  end

  // ---------------- 15-point network ----------------
  localparam int n15_N = 15, n15_LAT = 8;
  // SRC[q]: input position whose sample must appear at output position q.
  localparam int n15_SRC [15] = '{0, 5, 10, 1, 6, 11, 2, 7, 12, 3, 8, 13, 4, 9, 14};
  logic                n15_in_sync, n15_out_sync;
  logic signed [W-1:0] n15_in_re, n15_in_im, n15_out_re, n15_out_im;
  int n15_sync_time [$];
  int n15_of = 0, n15_opos = -1, n15_frames = 0, n15_b2b = 0;

  perm_net #(.W(W), .N(P15_N), .STAGES(P15_STAGES), .LEN(P15_LEN), .PAT(P15_PAT)) n15_dut (
    .clk, .rst, .in_sync(n15_in_sync), .in_re(n15_in_re), .in_im(n15_in_im),
    .out_sync(n15_out_sync), .out_re(n15_out_re), .out_im(n15_out_im)
  );

  // Each sample carries its frame and position as a tag.
  initial begin
    n15_in_sync = 0; n15_in_re = 0; n15_in_im = 0;
    @(negedge clk iff !rst);
    repeat (2) @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      if (f == NF1) begin
        n15_in_sync = 0; n15_in_re = -1; n15_in_im = -1;
        repeat (n15_LAT + 5) @(negedge clk);
      end
      for (int q = 0; q < n15_N; q++) begin
        n15_in_sync = (q == 0);
        n15_in_re   = W'(f * 100 + q);
        n15_in_im   = W'(-(f * 100 + q));
        @(negedge clk);
      end
    end
    n15_in_sync = 0; n15_in_re = -1; n15_in_im = -1;
  end

  always @(posedge clk) if (!rst) begin
    if (n15_in_sync) n15_sync_time.push_back(cyc);
    if (n15_out_sync) begin
      int t0;
      t0 = n15_sync_time.pop_front();
      checks++;
      if (cyc - t0 != n15_LAT) begin
        failures++;
        $display("15-point network: latency %0d, expected %0d", cyc - t0, n15_LAT);
      end
      if (n15_opos == n15_N) n15_b2b++;
      n15_opos = 0;
    end
    if (n15_opos >= 0 && n15_opos < n15_N) begin
      int want;
      want = n15_of * 100 + n15_SRC[n15_opos];
      checks++;
      if (int'(n15_out_re) != want || int'(n15_out_im) != -want) begin
        failures++;
        if (failures < 20)
          $display("15-point network: frame %0d pos %0d got %0d/%0d want %0d", n15_of, n15_opos, n15_out_re, n15_out_im, want);
      end
      n15_opos++;
      if (n15_opos == n15_N) begin
        n15_frames++;
        n15_of++;
      end
    end else if (n15_opos == n15_N && !n15_out_sync) n15_opos = -1;
  end

  // ---------------- 30-point network ----------------
  localparam int n30_N = 30, n30_LAT = 20;
  // SRC[q]: input position whose sample must appear at output position q.
  localparam int n30_SRC [30] = '{0, 5, 10, 15, 20, 25, 1, 6, 11, 16, 21, 26, 2, 7, 12, 17, 22, 27, 3, 8, 13, 18, 23, 28, 4, 9, 14, 19, 24, 29};
  logic                n30_in_sync, n30_out_sync;
  logic signed [W-1:0] n30_in_re, n30_in_im, n30_out_re, n30_out_im;
  int n30_sync_time [$];
  int n30_of = 0, n30_opos = -1, n30_frames = 0, n30_b2b = 0;

  perm_net #(.W(W), .N(P30_N), .STAGES(P30_STAGES), .LEN(P30_LEN), .PAT(P30_PAT)) n30_dut (
    .clk, .rst, .in_sync(n30_in_sync), .in_re(n30_in_re), .in_im(n30_in_im),
    .out_sync(n30_out_sync), .out_re(n30_out_re), .out_im(n30_out_im)
  );

  // Each sample carries its frame and position as a tag.
  initial begin
    n30_in_sync = 0; n30_in_re = 0; n30_in_im = 0;
    @(negedge clk iff !rst);
    repeat (2) @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      if (f == NF1) begin
        n30_in_sync = 0; n30_in_re = -1; n30_in_im = -1;
        repeat (n30_LAT + 5) @(negedge clk);
      end
      for (int q = 0; q < n30_N; q++) begin
        n30_in_sync = (q == 0);
        n30_in_re   = W'(f * 100 + q);
        n30_in_im   = W'(-(f * 100 + q));
        @(negedge clk);
      end
    end
    n30_in_sync = 0; n30_in_re = -1; n30_in_im = -1;
  end

  always @(posedge clk) if (!rst) begin
    if (n30_in_sync) n30_sync_time.push_back(cyc);
    if (n30_out_sync) begin
      int t0;
      t0 = n30_sync_time.pop_front();
      checks++;
      if (cyc - t0 != n30_LAT) begin
        failures++;
        $display("30-point network: latency %0d, expected %0d", cyc - t0, n30_LAT);
      end
      if (n30_opos == n30_N) n30_b2b++;
      n30_opos = 0;
    end
    if (n30_opos >= 0 && n30_opos < n30_N) begin
      int want;
      want = n30_of * 100 + n30_SRC[n30_opos];
      checks++;
      if (int'(n30_out_re) != want || int'(n30_out_im) != -want) begin
        failures++;
        if (failures < 20)
          $display("30-point network: frame %0d pos %0d got %0d/%0d want %0d", n30_of, n30_opos, n30_out_re, n30_out_im, want);
      end
      n30_opos++;
      if (n30_opos == n30_N) begin
        n30_frames++;
        n30_of++;
      end
    end else if (n30_opos == n30_N && !n30_out_sync) n30_opos = -1;
  end

  initial begin
    wait (n6_frames == NF && n15_frames == NF && n30_frames == NF);
    repeat (3) @(posedge clk);
    checks++;
    if (n6_b2b == 0) begin failures++; $display("6-point network: no back-to-back frames"); end
    $display("6-point network: frames=%0d back_to_back=%0d", n6_frames, n6_b2b);
    checks++;
    if (n15_b2b == 0) begin failures++; $display("15-point network: no back-to-back frames"); end
    $display("15-point network: frames=%0d back_to_back=%0d", n15_frames, n15_b2b);
    checks++;
    if (n30_b2b == 0) begin failures++; $display("30-point network: no back-to-back frames"); end
    $display("30-point network: frames=%0d back_to_back=%0d", n30_frames, n30_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
