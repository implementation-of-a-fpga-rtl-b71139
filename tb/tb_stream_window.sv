// tb_stream_window: self-checking test of the neighbourhood generator stream_window.
//
// A 5x5 and a 3x3 instance receive the same stream of three 9x6 frames in which every pixel
// carries its own frame number, row and column. Every window that comes out must then hold, at
// tap (i, j), exactly the pixel at (row + i - K/2, column + j - K/2) clamped into the frame, of
// the same frame, and must name the right centre row and column. Frame 0 runs without stalls and
// checks that the first window is offered one clock after input pixel (K/2)*W + K/2 (counted from
// 0) is accepted; frames 1 and 2 run with random gaps and stalls, and the 3x3 taps of the last
// rows are produced by the end-of-frame flush.
module tb_stream_window;

  localparam int W = 9, H = 6, N = W * H, FRAMES = 3;

  logic clock, reset;
  event go;
  initial begin
    clock = 0;
    forever #5 clock = ~clock;
  end

  logic [15:0] din_data;
  logic        din_valid, din_sop, din_eop;
  logic        in_ready [2];
  logic [15:0] win5 [5][5];
  logic [15:0] win3 [3][3];
  logic        win_valid [2];
  logic        win_ready [2];
  logic [2:0]  win_row [2];
  logic [3:0]  win_col [2];

  stream_window #(.IMG_W(W), .IMG_H(H), .K(5), .DW(16)) dut5 (
    .clock, .reset, .in_data(din_data), .in_valid(din_valid), .in_ready(in_ready[0]),
    .in_sop(din_sop), .in_eop(din_eop), .win(win5), .win_valid(win_valid[0]),
    .win_ready(win_ready[0]), .win_row(win_row[0]), .win_col(win_col[0]));
  stream_window #(.IMG_W(W), .IMG_H(H), .K(3), .DW(16)) dut3 (
    .clock, .reset, .in_data(din_data), .in_valid(din_valid), .in_ready(in_ready[1]),
    .in_sop(din_sop), .in_eop(din_eop), .win(win3), .win_valid(win_valid[1]),
    .win_ready(win_ready[1]), .win_row(win_row[1]), .win_col(win_col[1]));

  int checks, failures;
  int gap_pct, stall_pct;
  int cycle, first_in_cycle, first_out_cycle [2];
  int sent, got [2];
  int both_ready_cycles;

  always @(posedge clock) cycle <= cycle + 1;

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endfunction

  function automatic logic [15:0] tag(int f, int r, int c);
    return 16'((f << 12) | (r << 6) | c);
  endfunction

  function automatic int clampi(int v, int hi);
    return (v < 0) ? 0 : (v > hi) ? hi : v;
  endfunction

  // producer: a pixel is sent only when both instances take it
  initial begin
    bit fired;
    fired = 0;
    @go;
    forever begin
      @(negedge clock);
      if (fired) begin din_valid = 0; fired = 0; end
      if (!din_valid && sent < FRAMES * N && (sent >= N ? $urandom_range(99) >= gap_pct : 1)) begin
        din_valid = 1;
        din_data  = tag(sent / N, (sent % N) / W, sent % W);
        din_sop   = (sent % N == 0);
        din_eop   = (sent % N == N - 1);
      end
      #1;
      if (din_valid && in_ready[0] && in_ready[1]) begin
        if (sent == 0) first_in_cycle = cycle;
        sent++;
        fired = 1;
        both_ready_cycles++;
      end else if (din_valid && (in_ready[0] || in_ready[1])) begin
        din_valid = 0;    // withdraw so neither takes it alone; present again next cycle
      end
    end
  end

  for (genvar k = 0; k < 2; k++) begin : g_sink
    localparam int K = (k == 0) ? 5 : 3;
    initial begin
      @go;
      forever begin
        @(negedge clock);
        win_ready[k] = (got[k] >= N) ? ($urandom_range(99) >= stall_pct) : 1'b1;
        #1;
        if (win_valid[k] && win_ready[k]) begin
          int f, p, r, c;
          bit ok;
          f = got[k] / N;
          p = got[k] % N;
          r = p / W;
          c = p % W;
          ok = (int'(win_row[k]) == r) && (int'(win_col[k]) == c);
          for (int i = 0; i < K; i++)
            for (int j = 0; j < K; j++) begin
              logic [15:0] v;
              v = (k == 0) ? win5[i][j] : win3[i % 3][j % 3];
              if (v != tag(f, clampi(r + i - K / 2, H - 1), clampi(c + j - K / 2, W - 1))) ok = 0;
            end
          check(ok, $sformatf("K=%0d frame %0d window (%0d,%0d)", K, f, r, c));
          if (got[k] == 0) first_out_cycle[k] = cycle;
          got[k]++;
        end
      end
    end
  end

  initial begin
    reset = 1; din_valid = 0; din_sop = 0; din_eop = 0; din_data = 0;
    win_ready = '{0, 0};
    checks = 0; failures = 0; gap_pct = 0; stall_pct = 0; cycle = 0;
    first_in_cycle = -1; first_out_cycle = '{-1, -1}; sent = 0; got = '{0, 0};
    both_ready_cycles = 0;
    repeat (3) @(posedge clock);
    reset = 0;
    @(posedge clock);
    ->go;
    wait (got[0] >= N && got[1] >= N);
    // window of pixel 0 is registered by the clock that accepts pixel (K/2)*W + K/2
    check(first_out_cycle[0] - first_in_cycle == 2 * W + 2 + 1,
          $sformatf("K=5 first window after %0d clocks", first_out_cycle[0] - first_in_cycle));
    check(first_out_cycle[1] - first_in_cycle == W + 1 + 1,
          $sformatf("K=3 first window after %0d clocks", first_out_cycle[1] - first_in_cycle));
    gap_pct = 30;
    stall_pct = 30;
    wait (got[0] == FRAMES * N && got[1] == FRAMES * N);
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
