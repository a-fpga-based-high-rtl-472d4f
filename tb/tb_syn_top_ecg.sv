// tb_syn_top_ecg: end-to-end test of the ECG chain.
//
// Runs the top with the ROM source, switches to the ADC source (two
// behavioural converters on the PMOD lines) and back to the ROM. It checks:
//  - every ROM sample entering the filters against the beat formula, with the
//    ROM address continuing across the ADC phase;
//  - every ADC sample entering the filters against the value the converter
//    model sampled, and ADC frames only in ADC mode;
//  - every filtered output, bit-exactly, against reference notch and
//    band-pass convolutions of the samples that entered;
//  - each analysis result of the ROM phase: R, P, Q, S and T found at the
//    ROM beat's positions shifted by the 75-sample filter delay (within 2
//    samples), the intervals derived from them, and a non-zero duration for
//    every wave, with R and Q narrower than T;
//  - that no frame is dropped;
//  - that the interference is removed: in the ROM phase the mean distance
//    between the filtered output and the interference-free beat passed
//    through reference filters must be at most 10 LSB (it is about 60 LSB
//    before filtering).
// Mechanisms counted (each must occur): ROM samples, ADC frames, source
// switches, analysis results.
module tb_syn_top_ecg;
  import ecg_pkg::*;
  import pfir_pkg::*;

  localparam int FS       = 300;
  localparam int CLK_HZ   = 300 * 200;
  localparam int DIV      = CLK_HZ / FS;
  localparam int N        = 160;
  localparam int ROM1     = 6 * N;   // samples in the first ROM phase
  localparam int ADCN     = 300;     // samples in the ADC phase
  localparam int ROM2     = 200;     // samples in the second ROM phase
  localparam int DELAY    = (FILTER_NOTCH_TAPS - 1) / 2 + (FILTER_BPF_TAPS - 1) / 2;

  logic clk = 1'b0;
  logic rst, sim_or_real;
  logic sdata1, sdata2, adc_clk_out, adc_cs_bar;
  logic stft_din_valid, wave_valid, frame_dropped;
  sample_t stft_din, ecg_noisy, ecg_filtered;
  logic ecg_noisy_valid;
  wave_result_t wave_res;
  logic [11:0] v1, v2;

  int checks = 0, failures = 0;
  int n_rom = 0, n_adc = 0, n_switch = 0, n_results = 0, n_drops = 0, n_filt = 0;

  always #5 clk = ~clk;

  syn_top_ecg #(.CLK_HZ(CLK_HZ), .FS_HZ(FS)) dut (
    .clk_50MHz(clk), .rst, .sim_or_real,
    .adc_sdata1(sdata1), .adc_sdata2(sdata2), .adc_clk_out, .adc_cs_bar,
    .stft_din_valid, .stft_din, .ecg_noisy_valid, .ecg_noisy, .ecg_filtered,
    .wave_valid, .wave_res, .frame_dropped
  );

  adcs7476_model adc1 (.cs_bar(adc_cs_bar), .sclk(adc_clk_out), .value(v1), .sdata(sdata1));
  adcs7476_model adc2 (.cs_bar(adc_cs_bar), .sclk(adc_clk_out), .value(v2), .sdata(sdata2));

  task automatic fail(input string what);
    failures++;
    if (failures < 20) $display("FAIL: %s", what);
  endtask

  // ---- beat formula of the ROM ----
  function automatic int rom_ref(int n, bit noise = 1'b1);
    real v, d;
    int  iv;
    v = 1024.0;
    d = n - 12;  if (d > -8 && d < 8)  v += $floor(160.0 * (64.0 - d * d) / 64.0);
    d = n - 140; if (d > -14 && d < 14) v += $floor(320.0 * (196.0 - d * d) / 196.0);
    d = (n > 43) ? n - 43 : 43 - n; if (d < 5) v -= $floor(150.0 * (5.0 - d) / 5.0);
    d = (n > 52) ? n - 52 : 52 - n; if (d < 7) v += $floor(1600.0 * (7.0 - d) / 7.0);
    d = (n > 61) ? n - 61 : 61 - n; if (d < 5) v -= $floor(300.0 * (5.0 - d) / 5.0);
    if (noise) begin
      case (n % 6)
        0: v += 100.0;
        1, 5: v += 50.0;
        2, 4: v -= 50.0;
        default: v -= 100.0;
      endcase
      v += (n % 2 == 0) ? 60.0 : -60.0;
    end
    iv = int'(v);
    return (iv < 0) ? 0 : (iv > 4095) ? 4095 : iv;
  endfunction

  // ---- reference filters ----
  longint hn [FILTER_NOTCH_TAPS];
  longint hb [FILTER_BPF_TAPS];
  int     exp_q[$];
  // second reference chain, fed with the beat without interference
  longint cn [FILTER_NOTCH_TAPS];
  longint cb [FILTER_BPF_TAPS];
  int     clean_q[$];
  longint resid_in = 0, resid_out = 0;
  int     resid_n = 0;

  function automatic int fir_out(longint acc);
    acc = (acc + 64'sd16384) >>> 15;
    if (acc > 32767)  acc = 32767;
    if (acc < -32768) acc = -32768;
    return int'(acc);
  endfunction

  task automatic ref_filters(input int x);
    longint acc;
    int y1;
    for (int i = FILTER_NOTCH_TAPS - 1; i > 0; i--) hn[i] = hn[i-1];
    hn[0] = x;
    acc = 0;
    for (int k = 0; k < FILTER_NOTCH_TAPS; k++) acc += longint'(FILTER_NOTCH[k]) * hn[k];
    y1 = fir_out(acc);
    for (int i = FILTER_BPF_TAPS - 1; i > 0; i--) hb[i] = hb[i-1];
    hb[0] = y1;
    acc = 0;
    for (int k = 0; k < FILTER_BPF_TAPS; k++) acc += longint'(FILTER_BPF[k]) * hb[k];
    exp_q.push_back(fir_out(acc));
  endtask

  function automatic int abs_diff(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  task automatic clean_filters(input int x);
    longint acc;
    int y1;
    for (int i = FILTER_NOTCH_TAPS - 1; i > 0; i--) cn[i] = cn[i-1];
    cn[0] = x;
    acc = 0;
    for (int k = 0; k < FILTER_NOTCH_TAPS; k++) acc += longint'(FILTER_NOTCH[k]) * cn[k];
    y1 = fir_out(acc);
    for (int i = FILTER_BPF_TAPS - 1; i > 0; i--) cb[i] = cb[i-1];
    cb[0] = y1;
    acc = 0;
    for (int k = 0; k < FILTER_BPF_TAPS; k++) acc += longint'(FILTER_BPF[k]) * cb[k];
    clean_q.push_back(fir_out(acc));
  endtask

  // ---- source checks ----
  int rom_idx = 0;
  int adc_q[$];
  bit mode_adc = 1'b0;   // mode the testbench has selected

  always @(negedge adc_cs_bar) begin
    adc_q.push_back(int'(v2));
    if (!mode_adc) fail("ADC frame started in ROM mode");
    n_adc++;
    v1 = 12'($urandom);
    v2 = 12'($urandom);
  end

  always @(posedge clk) begin
    if (!rst && ecg_noisy_valid) begin
      int x, e;
      x = int'(ecg_noisy);
      checks++;
      if (mode_adc) begin
        e = (adc_q.size() > 0) ? adc_q.pop_front() : -1;
        if (x != e) fail($sformatf("ADC sample %0d expected %0d", x, e));
      end else begin
        e = rom_ref(rom_idx % N);
        if (rom_idx >= 2 * N && rom_idx < ROM1)
          resid_in += longint'(abs_diff(x, rom_ref(rom_idx % N, 1'b0)));
        rom_idx++;
        n_rom++;
        if (x != e) fail($sformatf("ROM sample %0d got %0d expected %0d", rom_idx - 1, x, e));
      end
      ref_filters(x);
      clean_filters(mode_adc ? x : rom_ref((rom_idx - 1) % N, 1'b0));
    end
    if (!rst && stft_din_valid) begin
      int e;
      checks++;
      n_filt++;
      e = (exp_q.size() > 0) ? exp_q.pop_front() : 99999;
      if (int'(stft_din) != e) fail($sformatf("filtered sample %0d got %0d expected %0d", n_filt, stft_din, e));
      e = (clean_q.size() > 0) ? clean_q.pop_front() : 0;
      if (n_filt > 2 * N && n_filt <= ROM1) begin
        resid_out += longint'(abs_diff(int'(stft_din), e));
        resid_n++;
      end
    end
    if (!rst && frame_dropped) n_drops++;
    if (!rst && wave_valid) begin
      n_results++;
      if (n_results <= ROM1 / N - 2) check_beat();
    end
  end

  function automatic bit near(int got, int want);
    return (got >= want - 2) && (got <= want + 2);
  endfunction

  task automatic check_beat();
    int r, p, q, s, t;
    r = 52 + DELAY; p = 12 + DELAY; q = 43 + DELAY; s = 61 + DELAY; t = 140 + DELAY;
    checks++;
    if (!near(int'(wave_res.r_idx), r) || !near(int'(wave_res.p_idx), p) ||
        !near(int'(wave_res.q_idx), q) || !near(int'(wave_res.s_idx), s) ||
        !near(int'(wave_res.t_idx), t))
      fail($sformatf("wave positions P%0d Q%0d R%0d S%0d T%0d", wave_res.p_idx,
           wave_res.q_idx, wave_res.r_idx, wave_res.s_idx, wave_res.t_idx));
    checks++;
    if (int'(wave_res.r_val) < 1000 || int'(wave_res.q_val) >= 0 || int'(wave_res.s_val) >= 0 ||
        int'(wave_res.p_val) <= 0 || int'(wave_res.t_val) <= 0)
      fail("wave amplitudes have the wrong sign");
    checks++;
    if (int'(wave_res.pr_interval) != $rtoi((wave_res.q_idx - wave_res.p_idx) * 1000.0 / FS + 0.5) ||
        int'(wave_res.qt_interval) != $rtoi((wave_res.t_idx - wave_res.q_idx) * 1000.0 / FS + 0.5) ||
        int'(wave_res.st_interval) != $rtoi((wave_res.t_idx - wave_res.s_idx) * 1000.0 / FS + 0.5) ||
        int'(wave_res.qrs_interval) != $rtoi((wave_res.s_idx - wave_res.q_idx) * 1000.0 / FS + 0.5))
      fail("intervals do not match the wave positions");
    // wave durations at half amplitude: every wave has one, the sharp Q, R
    // and S waves are narrower than the broad T wave
    checks++;
    if (wave_res.p_width == 0 || wave_res.q_width == 0 || wave_res.r_width == 0 ||
        wave_res.s_width == 0 || wave_res.t_width == 0 ||
        wave_res.r_width >= wave_res.t_width || wave_res.q_width >= wave_res.t_width)
      fail($sformatf("wave durations P%0d Q%0d R%0d S%0d T%0d ms", wave_res.p_width,
           wave_res.q_width, wave_res.r_width, wave_res.s_width, wave_res.t_width));
    $display("beat: dc=%0d P=%0d Q=%0d R=%0d S=%0d T=%0d  PR=%0d ms QRS=%0d ms QT=%0d ms ST=%0d ms",
      int'(wave_res.dc_value), int'(wave_res.p_val), int'(wave_res.q_val), int'(wave_res.r_val),
      int'(wave_res.s_val), int'(wave_res.t_val), wave_res.pr_interval, wave_res.qrs_interval, wave_res.qt_interval,
      wave_res.st_interval);
    $display("      widths: P=%0d Q=%0d R=%0d S=%0d T=%0d ms", wave_res.p_width, wave_res.q_width,
      wave_res.r_width, wave_res.s_width, wave_res.t_width);
  endtask

  task automatic wait_samples(input int n);
    for (int i = 0; i < n; i++) begin
      @(posedge clk);
      while (!ecg_noisy_valid) @(posedge clk);
    end
  endtask

  initial begin : watchdog
    repeat ((ROM1 + ADCN + ROM2 + 20) * DIV) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < FILTER_NOTCH_TAPS; i++) hn[i] = 0;
    for (int i = 0; i < FILTER_BPF_TAPS; i++) hb[i] = 0;
    for (int i = 0; i < FILTER_NOTCH_TAPS; i++) cn[i] = 0;
    for (int i = 0; i < FILTER_BPF_TAPS; i++) cb[i] = 0;
    rst = 1'b1; sim_or_real = 1'b0; v1 = 12'd100; v2 = 12'd200;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    wait_samples(ROM1);
    // switch to the converter (right after a sample, far from the next tick)
    @(negedge clk);
    sim_or_real <= 1'b1; mode_adc = 1'b1; n_switch++;
    wait_samples(ADCN);
    @(negedge clk);
    sim_or_real <= 1'b0; n_switch++;
    repeat (3) @(posedge clk);
    mode_adc = 1'b0;
    wait_samples(ROM2);
    repeat (10) @(posedge clk);
    checks++; if (n_rom != ROM1 + ROM2) fail($sformatf("%0d ROM samples", n_rom));
    checks++; if (n_adc != ADCN) fail($sformatf("%0d ADC frames", n_adc));
    checks++; if (n_switch != 2) fail("source switches");
    checks++; if (n_results < (ROM1 + ADCN + ROM2) / N - 2) fail($sformatf("%0d results", n_results));
    checks++; if (n_drops != 0) fail("frames dropped");
    checks++; if (n_filt != ROM1 + ADCN + ROM2) fail($sformatf("%0d filtered samples", n_filt));
    // double filtering: interference left in the filtered ROM beat, against
    // the same beat filtered without interference
    checks++;
    if (resid_n == 0 || resid_out > 10 * resid_n || resid_in < 40 * resid_n)
      fail($sformatf("interference: mean %0d LSB before, %0d after filtering",
                     resid_in / resid_n, resid_out / resid_n));
    $display("interference: mean %0d LSB before, %0d LSB after filtering (%0d samples)",
             resid_in / resid_n, resid_out / resid_n, resid_n);
    $display("mechanisms: rom_samples=%0d adc_frames=%0d switches=%0d results=%0d drops=%0d",
      n_rom, n_adc, n_switch, n_results, n_drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_syn_top_ecg
