// tb_sobel_operator: self-checking test of sobel_operator on a small frame.
//
// Three 11x8 frames: random pixels, drawn from a few levels in half of the frames so that zero
// gradients and |Gx| = |Gy| ties occur. Frame 0 runs without gaps or backpressure and its cycle
// count is checked (first output two clocks after input pixel W+1); frames 1 and 2 run with
// random gaps and backpressure. Magnitude, |Gx| and |Gy| are compared with canny_ref_pkg::sobel;
// the sector is checked by computing the angle of (Gx, Gy) with $atan2 and testing that it lies
// in that sector's 45-degree range.
module tb_sobel_operator;
  import canny_pkg::*;
  import canny_ref_pkg::*;

  localparam int W = 11, H = 8, N = W * H, FRAMES = 3;

  logic clock, reset;
  event go;
  initial begin
    clock = 0;
    forever #5 clock = ~clock;
  end

  logic [7:0] din_data;
  logic       din_valid, din_sop, din_eop, din_ready;
  grad_t      dout_data;
  logic       dout_valid, dout_sop, dout_eop, dout_ready;

  sobel_operator #(.IMG_W(W), .IMG_H(H)) dut (
    .clock, .reset, .din_data, .din_valid, .din_ready,
    .din_startofpacket(din_sop), .din_endofpacket(din_eop),
    .dout_data, .dout_valid, .dout_ready,
    .dout_startofpacket(dout_sop), .dout_endofpacket(dout_eop));

  int checks, failures;
  int img [FRAMES][];
  int rgx [FRAMES][], rgy [FRAMES][];
  int gap_pct, stall_pct;
  int cycle, first_in_cycle, last_out_cycle;
  int sent, got;
  int sectors_seen [8];

  always @(posedge clock) cycle <= cycle + 1;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
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
        din_data  = 8'(img[sent / N][sent % N]);
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
        int f, p, gx, gy;
        f  = got / N;
        p  = got % N;
        gx = rgx[f][p];
        gy = rgy[f][p];
        check(int'(dout_data.mag) == iabs(gx) + iabs(gy) && int'(dout_data.abs_gx) == iabs(gx) &&
              int'(dout_data.abs_gy) == iabs(gy),
              $sformatf("frame %0d pixel %0d: mag %0d |gx| %0d |gy| %0d, expected gx %0d gy %0d",
                        f, p, dout_data.mag, dout_data.abs_gx, dout_data.abs_gy, gx, gy));
        check(sector_ok(gx, gy, int'(dout_data.sector)),
              $sformatf("frame %0d pixel %0d: sector %0d for gx %0d gy %0d", f, p,
                        dout_data.sector, gx, gy));
        check(dout_sop == (p == 0) && dout_eop == (p == N - 1), "packet flags");
        if (gx != 0 || gy != 0) sectors_seen[dout_data.sector]++;
        if (got == N - 1) last_out_cycle = cycle;
        got++;
      end
    end
  end

  initial begin
    reset = 1; din_valid = 0; din_sop = 0; din_eop = 0; din_data = 0; dout_ready = 0;
    checks = 0; failures = 0; gap_pct = 0; stall_pct = 0; cycle = 0;
    first_in_cycle = -1; last_out_cycle = -1; sent = 0; got = 0;
    foreach (sectors_seen[s]) sectors_seen[s] = 0;
    for (int f = 0; f < FRAMES; f++) begin
      img[f] = new[N];
      foreach (img[f][i]) img[f][i] = (f % 2 == 1) ? 60 * int'($urandom_range(3))
                                                   : int'($urandom_range(255));
      sobel(img[f], W, H, rgx[f], rgy[f]);
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
    foreach (sectors_seen[s]) check(sectors_seen[s] > 0, $sformatf("sector %0d never seen", s));
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
