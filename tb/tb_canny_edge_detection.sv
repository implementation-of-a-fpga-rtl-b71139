// tb_canny_edge_detection: end-to-end test of the Canny subsystem at its default size.
//
// Two 640x480 greyscale frames are generated here: a noisy dark background, a bright rectangle
// (high-contrast edges), a disc of low contrast that overlaps the rectangle (weak edges, some
// touching strong ones), a diagonal bar, a smooth ramp (no edge) and a white patch (saturates the
// Gaussian stage). The expected edge map is computed by chaining the reference models of
// canny_ref_pkg (Gaussian, Sobel, non-maximum suppression, hysteresis) on the whole frame.
// Frame 0 runs without gaps or backpressure: its clock count from first input to last output
// must be one pixel per clock plus the fill latency of the chain, 5*W + 13 clocks, and the
// resulting time at the 180 MHz processing clock is printed. Frame 1 runs with random input gaps
// and output backpressure. Every mechanism of the design must occur at least once: input gaps,
// output stalls, end-of-frame flushing, Gaussian saturation, suppressed gradients, strong edges,
// weak pixels joined directly, joined along a chain, and dropped.
module tb_canny_edge_detection;
  import canny_ref_pkg::*;

  localparam int W = 640, H = 480, N = W * H, FRAMES = 2;
  localparam int LO = 80, HI = 160;           // the top's default thresholds
  localparam real CLK_MHZ = 180.0;

  logic clock, reset;
  event go;
  initial begin
    clock = 0;
    forever #5 clock = ~clock;
  end

  logic [7:0] din_data, dout_data;
  logic       din_valid, din_sop, din_eop, din_ready;
  logic       dout_valid, dout_sop, dout_eop, dout_ready;

  canny_edge_detection dut (
    .clock, .reset, .din_data, .din_valid, .din_ready,
    .din_startofpacket(din_sop), .din_endofpacket(din_eop),
    .dout_data, .dout_valid, .dout_ready,
    .dout_startofpacket(dout_sop), .dout_endofpacket(dout_eop));

  int checks, failures;
  int img [FRAMES][], rout [FRAMES][];
  int gap_pct, stall_pct;
  int cycle, first_in_cycle, last_out_cycle;
  int sent, got, edges;
  int n_gap, n_stall, n_flush, n_sat, n_supp, n_strong, n_weak_in, n_weak_out, n_chain;

  always @(posedge clock) cycle <= cycle + 1;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endfunction

  function automatic int scene(int r, int c, int f);
    int v;
    v = 40 + int'($urandom_range(12));
    if (r >= 20 && r < 80 && c >= 20 && c < 90) v = 255;
    if (r < 80 && c >= 500) v = 40 + (c - 500) / 2;
    if ((r - 300) * (r - 300) + (c - 380 - 20 * f) * (c - 380 - 20 * f) < 100 * 100) v = 88;
    if (r >= 100 && r < 300 && c >= 100 && c < 300) v = 200;
    if (r > 340 && r - c + 50 > -6 && r - c + 50 < 6) v = 150;
    return v;
  endfunction

  initial begin
    bit fired;
    fired = 0;
    @go;
    forever begin
      @(negedge clock);
      if (fired) begin din_valid = 0; fired = 0; end
      if (!din_valid && sent < FRAMES * N) begin
        if (sent < N || $urandom_range(99) >= gap_pct) begin
          din_valid = 1;
          din_data  = 8'(img[sent / N][sent % N]);
          din_sop   = (sent % N == 0);
          din_eop   = (sent % N == N - 1);
        end else n_gap++;
      end
      #1;
      if (din_valid && !din_ready && dout_ready) n_flush++;
      if (din_valid && din_ready) begin
        if (sent == 0) first_in_cycle = cycle;
        sent++;
        fired = 1;
      end
    end
  end

  initial begin
    @go;
    forever begin
      @(negedge clock);
      dout_ready = (got >= N) ? ($urandom_range(99) >= stall_pct) : 1'b1;
      #1;
      if (dout_valid && !dout_ready) n_stall++;
      if (dout_valid && dout_ready) begin
        int f, p;
        f = got / N;
        p = got % N;
        check(int'(dout_data) == rout[f][p],
              $sformatf("frame %0d pixel (%0d,%0d): %0d, expected %0d", f, p / W, p % W,
                        dout_data, rout[f][p]));
        check(dout_sop == (p == 0) && dout_eop == (p == N - 1), "packet flags");
        if (dout_data != 0) edges++;
        if (got == N - 1) last_out_cycle = cycle;
        got++;
      end
    end
  end

  initial begin
    int g[], gx[], gy[], t[];
    int s, wi, wo, ch;
    reset = 1; din_valid = 0; din_sop = 0; din_eop = 0; din_data = 0; dout_ready = 0;
    checks = 0; failures = 0; gap_pct = 0; stall_pct = 0; cycle = 0;
    first_in_cycle = -1; last_out_cycle = -1; sent = 0; got = 0; edges = 0;
    n_gap = 0; n_stall = 0; n_flush = 0; n_sat = 0; n_supp = 0;
    n_strong = 0; n_weak_in = 0; n_weak_out = 0; n_chain = 0;
    for (int f = 0; f < FRAMES; f++) begin
      img[f] = new[N];
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) img[f][r * W + c] = scene(r, c, f);
      gauss(img[f], W, H, 0, g);
      foreach (g[i]) if (g[i] == 255) n_sat++;
      sobel(g, W, H, gx, gy);
      nms(gx, gy, W, H, t);
      foreach (t[i]) if (t[i] == 0 && (gx[i] != 0 || gy[i] != 0)) n_supp++;
      hyst(t, W, H, LO, HI, rout[f], s, wi, wo, ch);
      n_strong += s; n_weak_in += wi; n_weak_out += wo; n_chain += ch;
    end
    repeat (3) @(posedge clock);
    reset = 0;
    @(posedge clock);
    ->go;
    wait (got >= N);
    check(last_out_cycle - first_in_cycle == (N - 1) + 5 * W + 13,
          $sformatf("frame 0 took %0d clocks", last_out_cycle - first_in_cycle));
    $display("frame 0: %0d clocks, %0.3f ms at %0.0f MHz", last_out_cycle - first_in_cycle + 1,
             real'(last_out_cycle - first_in_cycle + 1) / (CLK_MHZ * 1000.0), CLK_MHZ);
    gap_pct = 20;
    stall_pct = 20;
    wait (got == FRAMES * N);
    $display("edges %0d, gaps %0d, stalls %0d, flush cycles %0d, saturated %0d, suppressed %0d",
             edges, n_gap, n_stall, n_flush, n_sat, n_supp);
    $display("strong %0d, weak joined %0d (by chain %0d), weak dropped %0d",
             n_strong, n_weak_in, n_chain, n_weak_out);
    check(n_gap > 0, "input gaps");
    check(n_stall > 0, "output backpressure");
    check(n_flush > 0, "end-of-frame flush");
    check(n_sat > 0, "Gaussian saturation");
    check(n_supp > 0, "non-maximum suppression");
    check(n_strong > 0, "strong edges");
    check(n_weak_in > 0, "weak pixels joined");
    check(n_chain > 0, "weak pixels joined along a chain");
    check(n_weak_out > 0, "weak pixels dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clock);
    failures++;
    $display("watchdog: timed out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
