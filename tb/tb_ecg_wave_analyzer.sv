// tb_ecg_wave_analyzer: self-checking test of the time-domain wave analyzer.
//
// A stream of synthetic beats is generated, one per frame, with the R peak
// at a random position (including near both frame edges, so that the T
// search runs into the next frame), P/Q/S/T waves at random distances and
// random noise on top. A reference model here works on the whole stored
// stream: per frame it finds the DC level (truncated mean), the first
// maximum as R, and P, Q, S, T as the first extreme in their windows around
// R, and turns the peak distances into ms; it also counts, per wave, the
// samples beyond half the wave's amplitude. Every result must match exactly,
// and arrive before the next frame is complete. A final burst with one
// sample per clock must make the analyzer drop frames.
module tb_ecg_wave_analyzer;
  import ecg_pkg::*;

  localparam int N  = 160;
  localparam int PW = 60, QW = 12, SW = 12, TW = 105;
  localparam int FS = 300;
  localparam int NFRAMES = 40;

  logic clk = 1'b0;
  logic rst, in_valid, res_valid, frame_dropped;
  sample_t ecg_in;
  wave_result_t res;
  int checks = 0, failures = 0, results = 0, drops = 0;

  always #5 clk = ~clk;

  ecg_wave_analyzer #(.FRAME_LEN(N), .PW(PW), .QW(QW), .SW(SW), .TW(TW), .FS_HZ(FS)) dut (
    .clk, .rst, .in_valid, .ecg_in, .res_valid, .res, .frame_dropped
  );

  int stream [(NFRAMES + 2) * N];

  function automatic int ms(int samples);
    return $rtoi(samples * 1000.0 / FS + 0.5);
  endfunction

  function automatic int pulse(int n, int c, int w, int a);
    int d;
    d = (n > c) ? n - c : c - n;
    return (d < w) ? a * (w - d) / w : 0;
  endfunction

  task automatic make_stream();
    int base, r, p, q, s, t, a;
    for (int f = 0; f < NFRAMES + 2; f++) begin
      base = 500 + $urandom_range(0, 400);
      case (f % 4)
        1: r = $urandom_range(0, 5);
        2: r = $urandom_range(N - 6, N - 1);
        default: r = $urandom_range(0, N - 1);
      endcase
      p = r - $urandom_range(QW + 3, PW - 2);
      q = r - $urandom_range(2, QW - 2);
      s = r + $urandom_range(2, SW - 2);
      t = r + $urandom_range(SW + 10, TW - 10);
      a = 1500 + $urandom_range(0, 800);
      for (int i = 0; i < N; i++) begin
        stream[f * N + i] = base + $urandom_range(0, 30) - 15
          + pulse(i, r, 5, a) - pulse(i, q, 3, 200) - pulse(i, s, 3, 350)
          + pulse(i, p, 8, 150) + pulse(i, t, 12, 300);
      end
    end
  endtask

  // reference result of frame f
  task automatic ref_frame(input int f, output wave_result_t e);
    longint sum;
    int b, r, pi_, qi, si, ti, v, dc;
    b = f * N;
    sum = 0;
    r = b;
    for (int i = b; i < b + N; i++) begin
      sum += longint'(stream[i]);
      if (stream[i] > stream[r]) r = i;
    end
    dc = int'(sum / longint'(N));
    pi_ = r - PW; for (int i = r - PW; i <= r - QW - 1; i++) if (stream[i] > stream[pi_]) pi_ = i;
    qi = r - QW;  for (int i = r - QW; i <= r - 1; i++)      if (stream[i] < stream[qi]) qi = i;
    si = r + 1;   for (int i = r + 1; i <= r + SW; i++)      if (stream[i] < stream[si]) si = i;
    ti = r + SW + 1; for (int i = r + SW + 1; i <= r + TW; i++) if (stream[i] > stream[ti]) ti = i;
    e.dc_value = sample_t'(dc);
    e.p_val = amp_t'(stream[pi_] - dc);
    e.q_val = amp_t'(stream[qi] - dc);
    e.r_val = amp_t'(stream[r] - dc);
    e.s_val = amp_t'(stream[si] - dc);
    e.t_val = amp_t'(stream[ti] - dc);
    e.p_idx = pos_t'(pi_ - b);
    e.q_idx = pos_t'(qi - b);
    e.r_idx = pos_t'(r - b);
    e.s_idx = pos_t'(si - b);
    e.t_idx = pos_t'(ti - b);
    e.pr_interval  = ms_t'(ms(qi - pi_));
    e.qrs_interval = ms_t'(ms(si - qi));
    e.qt_interval  = ms_t'(ms(ti - qi));
    e.st_interval  = ms_t'(ms(ti - si));
    e.p_width = ms_t'(ms(width(r - PW, r - QW - 1, stream[pi_] - dc, dc, 1'b1)));
    e.q_width = ms_t'(ms(width(r - QW, r - 1, stream[qi] - dc, dc, 1'b0)));
    e.r_width = ms_t'(ms(width(r - QW, r + SW, stream[r] - dc, dc, 1'b1)));
    e.s_width = ms_t'(ms(width(r + 1, r + SW, stream[si] - dc, dc, 1'b0)));
    e.t_width = ms_t'(ms(width(r + SW + 1, r + TW, stream[ti] - dc, dc, 1'b1)));
  endtask

  // samples in [lo, hi] beyond half the amplitude `amp` (floor of amp/2),
  // above the DC level for positive waves, below it for negative ones
  function automatic int width(int lo, int hi, int amp, int dc, bit positive);
    int half, cnt;
    half = (amp >= 0) ? amp / 2 : -((-amp + 1) / 2);
    cnt = 0;
    for (int i = lo; i <= hi; i++) begin
      if (positive && stream[i] - dc >= half) cnt++;
      if (!positive && stream[i] - dc <= half) cnt++;
    end
    return cnt;
  endfunction

  int next_frame = 1;   // frame 0 is history only
  int sent = 0;         // samples sent so far
  bit checking = 1'b1;

  always @(posedge clk) begin
    if (!rst && frame_dropped) drops++;
    if (!rst && res_valid && checking) begin
      wave_result_t e;
      ref_frame(next_frame, e);
      results++;
      checks++;
      if (res !== e) begin
        failures++;
        $display("FAIL: frame %0d", next_frame);
        $display("  got dc=%0d P=%0d@%0d Q=%0d@%0d R=%0d@%0d S=%0d@%0d T=%0d@%0d pr=%0d qrs=%0d qt=%0d st=%0d",
          res.dc_value, res.p_val, res.p_idx, res.q_val, res.q_idx, res.r_val, res.r_idx,
          res.s_val, res.s_idx, res.t_val, res.t_idx, res.pr_interval, res.qrs_interval,
          res.qt_interval, res.st_interval);
        $display("  exp dc=%0d P=%0d@%0d Q=%0d@%0d R=%0d@%0d S=%0d@%0d T=%0d@%0d pr=%0d qrs=%0d qt=%0d st=%0d",
          e.dc_value, e.p_val, e.p_idx, e.q_val, e.q_idx, e.r_val, e.r_idx,
          e.s_val, e.s_idx, e.t_val, e.t_idx, e.pr_interval, e.qrs_interval,
          e.qt_interval, e.st_interval);
        $display("  widths got %0d %0d %0d %0d %0d exp %0d %0d %0d %0d %0d", res.p_width, res.q_width,
          res.r_width, res.s_width, res.t_width, e.p_width, e.q_width, e.r_width, e.s_width, e.t_width);
      end
      // the result of frame f must be out before frame f+2 is complete
      checks++;
      if (sent > (next_frame + 2) * N) begin
        failures++;
        $display("FAIL: result of frame %0d late (%0d samples sent)", next_frame, sent);
      end
      next_frame++;
    end
  end

  initial begin : watchdog
    repeat ((NFRAMES + 6) * N * 12 + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    make_stream();
    rst = 1'b1; in_valid = 1'b0; ecg_in = '0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int i = 0; i < (NFRAMES + 1) * N + TW + 1; i++) begin
      ecg_in   <= sample_t'(stream[i]);
      in_valid <= 1'b1;
      @(posedge clk);
      sent++;
      in_valid <= 1'b0;
      repeat (7 + $urandom_range(0, 3)) @(posedge clk);
    end
    repeat (400) @(posedge clk);
    checks++;
    if (results != NFRAMES) begin
      failures++; $display("FAIL: %0d results for %0d frames", results, NFRAMES);
    end
    checks++;
    if (drops != 0) begin failures++; $display("FAIL: frames dropped at the normal rate"); end
    // overload: one sample per clock
    checking = 1'b0;
    for (int i = 0; i < 4 * N; i++) begin
      ecg_in   <= sample_t'(stream[i]);
      in_valid <= 1'b1;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (400) @(posedge clk);
    checks++;
    if (drops == 0) begin failures++; $display("FAIL: overload never dropped a frame"); end
    $display("results=%0d drops_in_overload=%0d", results, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_ecg_wave_analyzer
