// tb_fractional_me: end-to-end test of the two-engine interpolator at its default size.
//
// For each of five 10 x 10 frames (a three-level diagonal checkerboard, two random
// frames, clipping stripes, a flat frame) the frame is written through the write
// port and `start` is pulsed once. The test checks
//   * done_qpel 943 cycles and done_qpel_e4 2822 cycles after start;
//   * all 256 samples of engine I (quarter-pel grid of the centre 4 x 4 block) against
//     the reference model;
//   * all 256 samples of engine II against the reference quarter-pel grid of the
//     centre 4 x 4 block of engine I's 16 x 16 result, taken as a frame.
// The last frame is started again without a new write, as a back-to-back restart.
// It counts how often each mechanism of the design was exercised and fails if one
// never was: the four half-pel sample kinds of both engines, clipping low and high in
// the half-pel filter, edge clamping of filter taps, the three quarter-pel classes,
// engine II runs and restarts.
module tb_fractional_me;
  import fme_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, reset, start, wr_enb, done_qpel, done_qpel_e4;
  logic [6:0] wr_addr;
  logic [7:0] wr_data, qpo_rd_data, qpo_rd_data_e4;
  logic [7:0] qpo_rd_addr, qpo_rd_addr_e4;
  int img[], img2[];
  int n_kind [4], n_clip_lo = 0, n_clip_hi = 0, n_clamp = 0, n_class [3];
  int n_e2_runs = 0, n_restart = 0;

  fractional_me dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  // mechanism counts over one half-pel grid of a w x h frame
  task automatic count_grid(input int im[], input int w, input int h);
    for (int gy = 0; gy < 2 * h; gy++)
      for (int gx = 0; gx < 2 * w; gx++) begin
        int raw;
        n_kind[(gy % 2) * 2 + gx % 2]++;
        raw = (gy % 2 == 0 && gx % 2 == 1) ? fdiv(b1(im, w, h, gx / 2, gy / 2) + 16, 32) :
              (gy % 2 == 1 && gx % 2 == 0) ? fdiv(h1(im, w, h, gx / 2, gy / 2) + 16, 32) :
              (gy % 2 == 1 && gx % 2 == 1) ? fdiv(j1(im, w, h, gx / 2, gy / 2) + 512, 1024) : 0;
        if (raw < 0) n_clip_lo++;
        if (raw > 255) n_clip_hi++;
        if ((gx % 2 == 1 && (gx / 2 < 2 || gx / 2 + 3 >= w)) ||
            (gy % 2 == 1 && (gy / 2 < 2 || gy / 2 + 3 >= h))) n_clamp++;
      end
  endtask

  task automatic run(input int f, input bit rewrite);
    int cyc, cyc1;
    if (rewrite)
      for (int a = 0; a < 100; a++) begin
        @(negedge clk);
        wr_enb = 1; wr_addr = 7'(a); wr_data = 8'(img[a]);
      end
    else n_restart++;
    @(negedge clk) begin wr_enb = 0; start = 1; end
    @(negedge clk) start = 0;
    cyc = 1;
    cyc1 = 0;
    while (!done_qpel_e4) begin
      if (done_qpel) cyc1 = cyc;
      @(negedge clk);
      cyc++;
    end
    expect_eq(cyc1, 943, $sformatf("frame %0d done_qpel latency", f));
    expect_eq(cyc, 2822, $sformatf("frame %0d done_qpel_e4 latency", f));
    n_e2_runs++;
    // reference for both engines
    for (int a = 0; a < 256; a++) img2[a] = quarter(img, 10, 10, 3, 3, a % 16, a / 16);
    count_grid(img, 10, 10);
    count_grid(img2, 16, 16);
    for (int a = 0; a < 256; a++) begin
      qpo_rd_addr = 8'(a);
      qpo_rd_addr_e4 = 8'(a);
      @(negedge clk);
      n_class[(a % 2) + ((a / 16) % 2)]++;
      expect_eq(int'(qpo_rd_data), img2[a], $sformatf("frame %0d engine I q%0d", f, a));
      expect_eq(int'(qpo_rd_data_e4), quarter(img2, 16, 16, 6, 6, a % 16, a / 16),
                $sformatf("frame %0d engine II q%0d", f, a));
    end
  endtask

  initial begin
    img = new[100];
    img2 = new[256];
    foreach (n_kind[k]) n_kind[k] = 0;
    foreach (n_class[k]) n_class[k] = 0;
    reset = 1; start = 0; wr_enb = 0; wr_addr = 0; wr_data = 0;
    qpo_rd_addr = 0; qpo_rd_addr_e4 = 0;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int f = 0; f < 5; f++) begin
      for (int y = 0; y < 10; y++)
        for (int x = 0; x < 10; x++)
          img[y * 10 + x] = (f == 0) ? ((((x - y) % 3 + 3) % 3) * 64 + 60) :
                            (f == 3) ? ((((x + y) % 4) < 2) ? 255 : 0) :
                            (f == 4) ? 128 : int'($urandom_range(255));
      run(f, 1);
    end
    run(5, 0);
    $display("half-pel kinds G/b/h/j: %0d %0d %0d %0d", n_kind[0], n_kind[1], n_kind[2], n_kind[3]);
    $display("clipped low %0d high %0d, edge-clamped filters %0d", n_clip_lo, n_clip_hi, n_clamp);
    $display("quarter classes copied/axis/diagonal: %0d %0d %0d", n_class[0], n_class[1], n_class[2]);
    $display("engine II runs %0d, restarts without rewrite %0d", n_e2_runs, n_restart);
    for (int k = 0; k < 4; k++) expect_eq(int'(n_kind[k] > 0), 1, "half-pel kind seen");
    for (int k = 0; k < 3; k++) expect_eq(int'(n_class[k] > 0), 1, "quarter class seen");
    expect_eq(int'(n_clip_lo > 0), 1, "clip low seen");
    expect_eq(int'(n_clip_hi > 0), 1, "clip high seen");
    expect_eq(int'(n_clamp > 0), 1, "edge clamp seen");
    expect_eq(int'(n_e2_runs > 0), 1, "engine II ran");
    expect_eq(int'(n_restart > 0), 1, "restart seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
