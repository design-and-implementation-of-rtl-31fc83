// Self-checking test of the serial permutation circuit: tagged samples in
// back-to-back frames and after an idle gap; the output must be the input
// delayed by L with the samples at positions t-L and t swapped for every
// set pattern bit t (reference computed here from the pattern).
module tb_perm_cell;
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

  // ---------------- L=1 N=6 swap 2<->3 ----------------
  localparam int a_N = 6, a_LAT = 1;
  // SRC[q]: input position whose sample must appear at output position q.
  localparam int a_SRC [6] = '{0, 1, 3, 2, 4, 5};
  logic                a_in_sync, a_out_sync;
  logic signed [W-1:0] a_in_re, a_in_im, a_out_re, a_out_im;
  int a_sync_time [$];
  int a_of = 0, a_opos = -1, a_frames = 0, a_b2b = 0;

  perm_cell #(.W(W), .L(1), .N(6), .PAT(64'h8)) a_dut (
    .clk, .rst, .in_sync(a_in_sync), .in_re(a_in_re), .in_im(a_in_im),
    .out_sync(a_out_sync), .out_re(a_out_re), .out_im(a_out_im)
  );

  // Each sample carries its frame and position as a tag.
  initial begin
    a_in_sync = 0; a_in_re = 0; a_in_im = 0;
    @(negedge clk iff !rst);
    repeat (2) @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      if (f == NF1) begin
        a_in_sync = 0; a_in_re = -1; a_in_im = -1;
        repeat (a_LAT + 5) @(negedge clk);
      end
      for (int q = 0; q < a_N; q++) begin
        a_in_sync = (q == 0);
        a_in_re   = W'(f * 100 + q);
        a_in_im   = W'(-(f * 100 + q));
        @(negedge clk);
      end
    end
    a_in_sync = 0; a_in_re = -1; a_in_im = -1;
  end

  always @(posedge clk) if (!rst) begin
    if (a_in_sync) a_sync_time.push_back(cyc);
    if (a_out_sync) begin
      int t0;
      t0 = a_sync_time.pop_front();
      checks++;
      if (cyc - t0 != a_LAT) begin
        failures++;
        $display("L=1 N=6 swap 2<->3: latency %0d, expected %0d", cyc - t0, a_LAT);
      end
      if (a_opos == a_N) a_b2b++;
      a_opos = 0;
    end
    if (a_opos >= 0 && a_opos < a_N) begin
      int want;
      want = a_of * 100 + a_SRC[a_opos];
      checks++;
      if (int'(a_out_re) != want || int'(a_out_im) != -want) begin
        failures++;
        if (failures < 20)
          $display("L=1 N=6 swap 2<->3: frame %0d pos %0d got %0d/%0d want %0d", a_of, a_opos, a_out_re, a_out_im, want);
      end
      a_opos++;
      if (a_opos == a_N) begin
        a_frames++;
        a_of++;
      end
    end else if (a_opos == a_N && !a_out_sync) a_opos = -1;
  end

  // ---------------- L=3 N=10 swaps 2<->5, 6<->9 ----------------
  localparam int b_N = 10, b_LAT = 3;
  // SRC[q]: input position whose sample must appear at output position q.
  localparam int b_SRC [10] = '{0, 1, 5, 3, 4, 2, 9, 7, 8, 6};
  logic                b_in_sync, b_out_sync;
  logic signed [W-1:0] b_in_re, b_in_im, b_out_re, b_out_im;
  int b_sync_time [$];
  int b_of = 0, b_opos = -1, b_frames = 0, b_b2b = 0;

  perm_cell #(.W(W), .L(3), .N(10), .PAT(64'h220)) b_dut (
    .clk, .rst, .in_sync(b_in_sync), .in_re(b_in_re), .in_im(b_in_im),
    .out_sync(b_out_sync), .out_re(b_out_re), .out_im(b_out_im)
  );

  // Each sample carries its frame and position as a tag.
  initial begin
    b_in_sync = 0; b_in_re = 0; b_in_im = 0;
    @(negedge clk iff !rst);
    repeat (2) @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      if (f == NF1) begin
        b_in_sync = 0; b_in_re = -1; b_in_im = -1;
        repeat (b_LAT + 5) @(negedge clk);
      end
      for (int q = 0; q < b_N; q++) begin
        b_in_sync = (q == 0);
        b_in_re   = W'(f * 100 + q);
        b_in_im   = W'(-(f * 100 + q));
        @(negedge clk);
      end
    end
    b_in_sync = 0; b_in_re = -1; b_in_im = -1;
  end

  always @(posedge clk) if (!rst) begin
    if (b_in_sync) b_sync_time.push_back(cyc);
    if (b_out_sync) begin
      int t0;
      t0 = b_sync_time.pop_front();
      checks++;
      if (cyc - t0 != b_LAT) begin
        failures++;
        $display("L=3 N=10 swaps 2<->5, 6<->9: latency %0d, expected %0d", cyc - t0, b_LAT);
      end
      if (b_opos == b_N) b_b2b++;
      b_opos = 0;
    end
    if (b_opos >= 0 && b_opos < b_N) begin
      int want;
      want = b_of * 100 + b_SRC[b_opos];
      checks++;
      if (int'(b_out_re) != want || int'(b_out_im) != -want) begin
        failures++;
        if (failures < 20)
          $display("L=3 N=10 swaps 2<->5, 6<->9: frame %0d pos %0d got %0d/%0d want %0d", b_of, b_opos, b_out_re, b_out_im, want);
      end
      b_opos++;
      if (b_opos == b_N) begin
        b_frames++;
        b_of++;
      end
    end else if (b_opos == b_N && !b_out_sync) b_opos = -1;
  end

  // ---------------- L=4 N=15 swaps 2<->6, 5<->9, 8<->12 ----------------
  localparam int c_N = 15, c_LAT = 4;
  // SRC[q]: input position whose sample must appear at output position q.
  localparam int c_SRC [15] = '{0, 1, 6, 3, 4, 9, 2, 7, 12, 5, 10, 11, 8, 13, 14};
  logic                c_in_sync, c_out_sync;
  logic signed [W-1:0] c_in_re, c_in_im, c_out_re, c_out_im;
  int c_sync_time [$];
  int c_of = 0, c_opos = -1, c_frames = 0, c_b2b = 0;

  perm_cell #(.W(W), .L(4), .N(15), .PAT(64'h1240)) c_dut (
    .clk, .rst, .in_sync(c_in_sync), .in_re(c_in_re), .in_im(c_in_im),
    .out_sync(c_out_sync), .out_re(c_out_re), .out_im(c_out_im)
  );

  // Each sample carries its frame and position as a tag.
  initial begin
    c_in_sync = 0; c_in_re = 0; c_in_im = 0;
    @(negedge clk iff !rst);
    repeat (2) @(negedge clk);
    for (int f = 0; f < NF; f++) begin
      if (f == NF1) begin
        c_in_sync = 0; c_in_re = -1; c_in_im = -1;
        repeat (c_LAT + 5) @(negedge clk);
      end
      for (int q = 0; q < c_N; q++) begin
        c_in_sync = (q == 0);
        c_in_re   = W'(f * 100 + q);
        c_in_im   = W'(-(f * 100 + q));
        @(negedge clk);
      end
    end
    c_in_sync = 0; c_in_re = -1; c_in_im = -1;
  end

  always @(posedge clk) if (!rst) begin
    if (c_in_sync) c_sync_time.push_back(cyc);
    if (c_out_sync) begin
      int t0;
      t0 = c_sync_time.pop_front();
      checks++;
      if (cyc - t0 != c_LAT) begin
        failures++;
        $display("L=4 N=15 swaps 2<->6, 5<->9, 8<->12: latency %0d, expected %0d", cyc - t0, c_LAT);
      end
      if (c_opos == c_N) c_b2b++;
      c_opos = 0;
    end
    if (c_opos >= 0 && c_opos < c_N) begin
      int want;
      want = c_of * 100 + c_SRC[c_opos];
      checks++;
      if (int'(c_out_re) != want || int'(c_out_im) != -want) begin
        failures++;
        if (failures < 20)
          $display("L=4 N=15 swaps 2<->6, 5<->9, 8<->12: frame %0d pos %0d got %0d/%0d want %0d", c_of, c_opos, c_out_re, c_out_im, want);
      end
      c_opos++;
      if (c_opos == c_N) begin
        c_frames++;
        c_of++;
      end
    end else if (c_opos == c_N && !c_out_sync) c_opos = -1;
  end

  initial begin
    wait (a_frames == NF && b_frames == NF && c_frames == NF);
    repeat (3) @(posedge clk);
    checks++;
    if (a_b2b == 0) begin failures++; $display("L=1 N=6 swap 2<->3: no back-to-back frames"); end
    $display("L=1 N=6 swap 2<->3: frames=%0d back_to_back=%0d", a_frames, a_b2b);
    checks++;
    if (b_b2b == 0) begin failures++; $display("L=3 N=10 swaps 2<->5, 6<->9: no back-to-back frames"); end
    $display("L=3 N=10 swaps 2<->5, 6<->9: frames=%0d back_to_back=%0d", b_frames, b_b2b);
    checks++;
    if (c_b2b == 0) begin failures++; $display("L=4 N=15 swaps 2<->6, 5<->9, 8<->12: no back-to-back frames"); end
    $display("L=4 N=15 swaps 2<->6, 5<->9, 8<->12: frames=%0d back_to_back=%0d", c_frames, c_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
