// tb_non_maximum_suppression: self-checking test of non_maximum_suppression on a small frame.
//
// Input frames are random (Gx, Gy) fields, packed as canny_pkg::grad_t with the sector coded
// from the signs and the |Gx|/|Gy| comparison. Frames alternate between the full component range
// and a range of -4..4 that produces many equal magnitudes and 45-degree ties. The reference
// (canny_ref_pkg::nms) picks the two bracketing neighbours from the signs of the components
// alone, not from the sector code. Frame 0 runs without gaps or backpressure and its cycle count
// is checked; the other frames run with random gaps and backpressure. Both kept and suppressed
// pixels must occur.
module tb_non_maximum_suppression;
  import canny_pkg::*;
  import canny_ref_pkg::*;

  localparam int W = 10, H = 9, N = W * H, FRAMES = 4;

  logic clock, reset;
  event go;
  initial begin
    clock = 0;
    forever #5 clock = ~clock;
  end

  grad_t      din_data;
  logic       din_valid, din_sop, din_eop, din_ready;
  mag_t       dout_data;
  logic       dout_valid, dout_sop, dout_eop, dout_ready;

  non_maximum_suppression #(.IMG_W(W), .IMG_H(H)) dut (
    .clock, .reset, .din_data, .din_valid, .din_ready,
    .din_startofpacket(din_sop), .din_endofpacket(din_eop),
    .dout_data, .dout_valid, .dout_ready,
    .dout_startofpacket(dout_sop), .dout_endofpacket(dout_eop));

  int checks, failures;
  int gx [FRAMES][], gy [FRAMES][], rout [FRAMES][];
  int gap_pct, stall_pct;
  int cycle, first_in_cycle, last_out_cycle;
  int sent, got, kept, suppressed;

  always @(posedge clock) cycle <= cycle + 1;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endfunction

  function automatic grad_t pack(int x, int y);
    grad_t g;
    g.abs_gx = ABS_W'(iabs(x));
    g.abs_gy = ABS_W'(iabs(y));
    g.mag    = MAG_W'(iabs(x) + iabs(y));
    if (x >= 0 && y >= 0)     g.sector = (iabs(x) >= iabs(y)) ? SEC_0_45    : SEC_45_90;
    else if (x < 0 && y >= 0) g.sector = (iabs(x) >= iabs(y)) ? SEC_135_180 : SEC_90_135;
    else if (x < 0)           g.sector = (iabs(x) >= iabs(y)) ? SEC_180_225 : SEC_225_270;
    else                      g.sector = (iabs(x) >= iabs(y)) ? SEC_315_360 : SEC_270_315;
    return g;
  endfunction

  initial begin
    bit fired;
    fired = 0;
    @go;
    forever begin
      @(negedge clock);
      if (fired) begin din_valid = 0; fired = 0; end
      if (!din_valid && sent < FRAMES * N && (sent >= N ? $urandom_range(99) >= gap_pct : 1)) begin
        din_valid = 1;
        din_data  = pack(gx[sent / N][sent % N], gy[sent / N][sent % N]);
        din_sop   = (sent % N == 0);
        din_eop   = (sent % N == N - 1);
      end
      #1;
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
      if (dout_valid && dout_ready) begin
        int f, p;
        f = got / N;
        p = got % N;
        check(int'(dout_data) == rout[f][p],
              $sformatf("frame %0d pixel %0d: %0d, expected %0d (gx %0d gy %0d)", f, p,
                        dout_data, rout[f][p], gx[f][p], gy[f][p]));
        check(dout_sop == (p == 0) && dout_eop == (p == N - 1), "packet flags");
        if (rout[f][p] != 0) kept++;
        else if (gx[f][p] != 0 || gy[f][p] != 0) suppressed++;
        if (got == N - 1) last_out_cycle = cycle;
        got++;
      end
    end
  end

  initial begin
    reset = 1; din_valid = 0; din_sop = 0; din_eop = 0; din_data = '0; dout_ready = 0;
    checks = 0; failures = 0; gap_pct = 0; stall_pct = 0; cycle = 0;
    first_in_cycle = -1; last_out_cycle = -1; sent = 0; got = 0; kept = 0; suppressed = 0;
    for (int f = 0; f < FRAMES; f++) begin
      int lim;
      lim = (f % 2 == 1) ? 4 : 1020;
      gx[f] = new[N];
      gy[f] = new[N];
      foreach (gx[f][i]) begin
        gx[f][i] = int'($urandom_range(2 * lim)) - lim;
        gy[f][i] = int'($urandom_range(2 * lim)) - lim;
      end
      nms(gx[f], gy[f], W, H, rout[f]);
    end
    repeat (3) @(posedge clock);
    reset = 0;
    @(posedge clock);
    ->go;
    wait (got >= N);
    check(last_out_cycle - first_in_cycle == (N - 1) + (W + 1) + 2,
          $sformatf("frame 0 took %0d clocks", last_out_cycle - first_in_cycle));
    gap_pct = 30;
    stall_pct = 30;
    wait (got == FRAMES * N);
    check(kept > 0 && suppressed > 0, $sformatf("kept %0d suppressed %0d", kept, suppressed));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog: timed out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
