// tb_pfir_pkg: self-checking test of the two coefficient sets.
//
// Checks, for FILTER_NOTCH and FILTER_BPF, the tap count, that the set is
// symmetric (linear phase), and its gain at a few frequencies, computed here
// from the quantised coefficients at fs = 300 Hz:
//   notch    : DC and 10 Hz within 3 % of unity, 50 Hz at least 40 dB down;
//   band-pass: 10 Hz and 50 Hz within 3 % of unity, 150 Hz at least 60 dB
//              down.
module tb_pfir_pkg;
  import pfir_pkg::*;

  localparam real FS = 300.0;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // |H(f)| of a coefficient set, relative to 2^COEF_FRAC
  function automatic real gain_notch(real f);
    real re, im;
    re = 0.0; im = 0.0;
    for (int k = 0; k < FILTER_NOTCH_TAPS; k++) begin
      re += real'(FILTER_NOTCH[k]) * $cos(2.0 * PI * f / FS * k);
      im += real'(FILTER_NOTCH[k]) * $sin(2.0 * PI * f / FS * k);
    end
    return $sqrt(re * re + im * im) / real'(1 << COEF_FRAC);
  endfunction

  function automatic real gain_bpf(real f);
    real re, im;
    re = 0.0; im = 0.0;
    for (int k = 0; k < FILTER_BPF_TAPS; k++) begin
      re += real'(FILTER_BPF[k]) * $cos(2.0 * PI * f / FS * k);
      im += real'(FILTER_BPF[k]) * $sin(2.0 * PI * f / FS * k);
    end
    return $sqrt(re * re + im * im) / real'(1 << COEF_FRAC);
  endfunction

  task automatic check_pass(string name, real f, real g);
    checks++;
    if (g < 0.97 || g > 1.03) begin
      failures++;
      $display("FAIL: %s gain at %0.2f Hz is %0.4f, expected 1 +/- 3 %%", name, f, g);
    end
  endtask

  task automatic check_stop(string name, real f, real g, real db);
    checks++;
    if (g > $pow(10.0, -db / 20.0)) begin
      failures++;
      $display("FAIL: %s gain at %0.2f Hz is %0.6f, less than %0.0f dB down", name, f, g, db);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);

    checks++;
    if (FILTER_NOTCH_TAPS != 101) begin
      failures++; $display("FAIL: notch has %0d taps", FILTER_NOTCH_TAPS);
    end
    checks++;
    if (FILTER_BPF_TAPS != 51) begin
      failures++; $display("FAIL: band-pass has %0d taps", FILTER_BPF_TAPS);
    end

    for (int k = 0; k < FILTER_NOTCH_TAPS / 2; k++) begin
      checks++;
      if (FILTER_NOTCH[k] != FILTER_NOTCH[FILTER_NOTCH_TAPS-1-k]) begin
        failures++;
        $display("FAIL: notch tap %0d (%0d) differs from tap %0d (%0d)", k,
                 int'(FILTER_NOTCH[k]), FILTER_NOTCH_TAPS-1-k,
                 int'(FILTER_NOTCH[FILTER_NOTCH_TAPS-1-k]));
      end
    end
    for (int k = 0; k < FILTER_BPF_TAPS / 2; k++) begin
      checks++;
      if (FILTER_BPF[k] != FILTER_BPF[FILTER_BPF_TAPS-1-k]) begin
        failures++;
        $display("FAIL: band-pass tap %0d (%0d) differs from tap %0d (%0d)", k,
                 int'(FILTER_BPF[k]), FILTER_BPF_TAPS-1-k,
                 int'(FILTER_BPF[FILTER_BPF_TAPS-1-k]));
      end
    end

    check_pass("notch", 0.0, gain_notch(0.0));
    check_pass("notch", 10.0, gain_notch(10.0));
    check_stop("notch", 50.0, gain_notch(50.0), 40.0);
    check_pass("band-pass", 10.0, gain_bpf(10.0));
    check_pass("band-pass", 50.0, gain_bpf(50.0));
    check_stop("band-pass", 150.0, gain_bpf(150.0), 60.0);

    $display("notch: %0.1f dB at 50 Hz; band-pass: %0.1f dB at 150 Hz",
             20.0 * $log10(gain_notch(50.0)), 20.0 * $log10(gain_bpf(150.0)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
