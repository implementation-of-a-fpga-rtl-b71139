// tb_hysteresis: self-checking test of hysteresis on a small frame.
//
// Frames 0-2 hold random magnitudes spread over none / weak / strong, including values exactly
// at both thresholds. Frame 3 is built: a strong pixel at the left end of a horizontal run of
// weak pixels, a diagonal weak run hanging below a strong pixel, and an isolated weak run, so
// that weak pixels are joined both directly and along a chain, and a weak run is rejected. Output
// pixels are compared with the one-pass reference canny_ref_pkg::hyst. Frame 0 runs without gaps
// or backpressure and its cycle count is checked; the others run with random gaps and stalls.
module tb_hysteresis;
  import canny_pkg::*;
  import canny_ref_pkg::*;

  localparam int W = 12, H = 8, N = W * H, FRAMES = 4;
  localparam int LO = 30, HI = 60;

  logic clock, reset;
  event go;
  initial begin
    clock = 0;
    forever #5 clock = ~clock;
  end

  mag_t       din_data;
  logic       din_valid, din_sop, din_eop, din_ready;
  logic [7:0] dout_data;
  logic       dout_valid, dout_sop, dout_eop, dout_ready;

  hysteresis #(.IMG_W(W), .IMG_H(H), .T_LOW(11'(LO)), .T_HIGH(11'(HI))) dut (
    .clock, .reset, .din_data, .din_valid, .din_ready,
    .din_startofpacket(din_sop), .din_endofpacket(din_eop),
    .dout_data, .dout_valid, .dout_ready,
    .dout_startofpacket(dout_sop), .dout_endofpacket(dout_eop));

  int checks, failures;
  int m [FRAMES][], rout [FRAMES][];
  int gap_pct, stall_pct;
  int cycle, first_in_cycle, last_out_cycle;
  int sent, got;
  int n_strong, n_weak_in, n_weak_out, n_chain;

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
        din_data  = 11'(m[sent / N][sent % N]);
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
              $sformatf("frame %0d pixel (%0d,%0d): %0d, expected %0d", f, p / W, p % W,
                        dout_data, rout[f][p]));
        check(dout_sop == (p == 0) && dout_eop == (p == N - 1), "packet flags");
        if (got == N - 1) last_out_cycle = cycle;
        got++;
      end
    end
  end

  initial begin
    int s, wi, wo, ch;
    reset = 1; din_valid = 0; din_sop = 0; din_eop = 0; din_data = '0; dout_ready = 0;
    checks = 0; failures = 0; gap_pct = 0; stall_pct = 0; cycle = 0;
    first_in_cycle = -1; last_out_cycle = -1; sent = 0; got = 0;
    n_strong = 0; n_weak_in = 0; n_weak_out = 0; n_chain = 0;
    for (int f = 0; f < FRAMES; f++) begin
      m[f] = new[N];
      foreach (m[f][i]) begin
        case ($urandom_range(9))
          0, 1, 2, 3: m[f][i] = 0;
          4:          m[f][i] = ($urandom_range(1) == 0) ? LO : HI;
          5, 6, 7:    m[f][i] = LO + 1 + int'($urandom_range(HI - LO - 1));
          default:    m[f][i] = HI + 1 + int'($urandom_range(200));
        endcase
        if (f == FRAMES - 1) m[f][i] = 0;
      end
      if (f == FRAMES - 1) begin
        m[f][1 * W + 1] = HI + 5;                               // strong, then weak run right
        for (int c = 2; c < 9; c++) m[f][1 * W + c] = LO + 3;
        m[f][3 * W + 9] = HI + 20;                              // strong, weak diagonal below-left
        for (int k = 1; k < 4; k++) m[f][(3 + k) * W + 9 - k] = LO + 10;
        for (int c = 1; c < 5; c++) m[f][6 * W + c] = LO + 1;   // isolated weak run
      end
      hyst(m[f], W, H, LO, HI, rout[f], s, wi, wo, ch);
      n_strong += s; n_weak_in += wi; n_weak_out += wo; n_chain += ch;
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
    check(n_strong > 0 && n_weak_in > 0 && n_weak_out > 0 && n_chain > 0,
          $sformatf("strong %0d weak joined %0d weak dropped %0d joined by chain %0d",
                    n_strong, n_weak_in, n_weak_out, n_chain));
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
