// tb_gaussian_filter: self-checking test of gaussian_filter on a small frame.
//
// Two instances, one per built-in kernel, receive the same stream: three 13x9 frames of random
// pixels (a quarter of them 255, so that the shift-normalised sum saturates). Frame 0 runs with
// no gaps or backpressure and its cycle count is checked against one pixel per clock plus the
// fill latency (first output two clocks after input pixel 2*W+2); frames 1 and 2 run with random
// input gaps and random output backpressure. Every output pixel and its startofpacket /
// endofpacket flags are compared with canny_ref_pkg::gauss.
module tb_gaussian_filter;
  import canny_ref_pkg::*;

  localparam int W = 13, H = 9, N = W * H, FRAMES = 3;

  logic clock, reset;
  event go;
  initial begin
    clock = 0;
    forever #5 clock = ~clock;
  end

  logic [7:0] din_data;
  logic       din_valid, din_sop, din_eop;
  logic       din_ready0, din_ready1;
  logic [7:0] dout_data [2];
  logic       dout_valid [2], dout_sop [2], dout_eop [2];
  logic       dout_ready;

  gaussian_filter #(.IMG_W(W), .IMG_H(H), .KERNEL(0)) dut0 (
    .clock, .reset, .din_data, .din_valid, .din_ready(din_ready0),
    .din_startofpacket(din_sop), .din_endofpacket(din_eop),
    .dout_data(dout_data[0]), .dout_valid(dout_valid[0]), .dout_ready,
    .dout_startofpacket(dout_sop[0]), .dout_endofpacket(dout_eop[0]));
  gaussian_filter #(.IMG_W(W), .IMG_H(H), .KERNEL(1)) dut1 (
    .clock, .reset, .din_data, .din_valid, .din_ready(din_ready1),
    .din_startofpacket(din_sop), .din_endofpacket(din_eop),
    .dout_data(dout_data[1]), .dout_valid(dout_valid[1]), .dout_ready,
    .dout_startofpacket(dout_sop[1]), .dout_endofpacket(dout_eop[1]));

  int checks, failures;
  int img [FRAMES][];
  int ref_out [2][FRAMES][];
  int gap_pct, stall_pct;
  int cycle, first_in_cycle, last_out_cycle;
  int sent, got [2];
  int saturated;

  always @(posedge clock) cycle <= cycle + 1;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endfunction

  // producer: presents pixels at the falling edge, sees the transfer just after it
  initial begin
    bit fired = 0;
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
      check(din_ready0 == din_ready1, "both instances ready together");
      if (din_valid && din_ready0) begin
        if (sent == 0) first_in_cycle = cycle;
        sent++;
        fired = 1;
      end
    end
  end

  // consumer
  initial begin
    @go;
    forever begin
      @(negedge clock);
      dout_ready = (got[0] >= N) ? ($urandom_range(99) >= stall_pct) : 1'b1;
      #1;
      for (int k = 0; k < 2; k++)
        if (dout_valid[k] && dout_ready) begin
          int f, p;
          f = got[k] / N;
          p = got[k] % N;
          check(dout_data[k] == 8'(ref_out[k][f][p]),
                $sformatf("kernel %0d frame %0d pixel %0d: %0d, expected %0d", k, f, p,
                          dout_data[k], ref_out[k][f][p]));
          check(dout_sop[k] == (p == 0) && dout_eop[k] == (p == N - 1), "packet flags");
          if (k == 0 && got[0] == N - 1) last_out_cycle = cycle;
          got[k]++;
        end
    end
  end

  initial begin
    reset = 1; din_valid = 0; din_sop = 0; din_eop = 0; din_data = 0; dout_ready = 0;
    checks = 0; failures = 0; gap_pct = 0; stall_pct = 0; cycle = 0;
    first_in_cycle = -1; last_out_cycle = -1; sent = 0; got = '{0, 0}; saturated = 0;
    for (int f = 0; f < FRAMES; f++) begin
      img[f] = new[N];
      foreach (img[f][i]) img[f][i] = ($urandom_range(3) == 0) ? 255 : int'($urandom_range(255));
      gauss(img[f], W, H, 0, ref_out[0][f]);
      gauss(img[f], W, H, 1, ref_out[1][f]);
      foreach (ref_out[0][f][i]) if (ref_out[0][f][i] == 255) saturated++;
    end
    repeat (3) @(posedge clock);
    reset = 0;
    @(posedge clock);
    ->go;
    wait (got[0] >= N);
    // frame 0: one pixel per clock, first output two clocks after input pixel 2W+2
    check(last_out_cycle - first_in_cycle == (N - 1) + (2 * W + 2) + 2,
          $sformatf("frame 0 took %0d clocks", last_out_cycle - first_in_cycle));
    gap_pct = 30;
    stall_pct = 30;
    wait (got[0] == FRAMES * N && got[1] == FRAMES * N);
    check(saturated > 0, "saturation exercised");
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
