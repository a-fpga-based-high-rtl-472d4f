// tb_ecg_rom: self-checking test of the ECG test-signal ROM.
//
// Plays the ROM for two full beats with irregular tick spacing and checks
// each sample, one clock after its tick, against a reference computed here
// from the beat formula (baseline, P/T parabolas, Q/R/S triangles, 50 Hz and
// 150 Hz interference). Also checks the wrap after DEPTH samples and that the
// valid strobe appears only after ticks.
module tb_ecg_rom;
  import ecg_pkg::*;

  localparam int DEPTH = 160;

  logic clk = 1'b0;
  logic rst, tick, vld;
  adc_word_t data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ecg_rom #(.DEPTH(DEPTH)) dut (.clk, .rst, .sample_tick(tick), .ecg_valid(vld), .ecg_data(data));

  // independent reference of the beat
  function automatic int ref_sample(int n);
    real v, d;
    int  iv;
    v = 1024.0;
    d = n - 12;  if (d > -8 && d < 8)  v += $floor(160.0 * (64.0 - d * d) / 64.0);
    d = n - 140; if (d > -14 && d < 14) v += $floor(320.0 * (196.0 - d * d) / 196.0);
    d = (n > 43) ? n - 43 : 43 - n; if (d < 5) v -= $floor(150.0 * (5.0 - d) / 5.0);
    d = (n > 52) ? n - 52 : 52 - n; if (d < 7) v += $floor(1600.0 * (7.0 - d) / 7.0);
    d = (n > 61) ? n - 61 : 61 - n; if (d < 5) v -= $floor(300.0 * (5.0 - d) / 5.0);
    case (n % 6)
      0: v += 100.0;
      1, 5: v += 50.0;
      2, 4: v -= 50.0;
      default: v -= 100.0;
    endcase
    v += (n % 2 == 0) ? 60.0 : -60.0;
    iv = int'(v);
    if (iv < 0) iv = 0;
    if (iv > 4095) iv = 4095;
    return iv;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int peak, peak_n;
    rst = 1'b1; tick = 1'b0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);
    checks++; if (vld) begin failures++; $display("FAIL: valid without tick"); end
    peak = 0; peak_n = -1;
    for (int n = 0; n < 2 * DEPTH; n++) begin
      tick <= 1'b1;
      @(posedge clk);
      tick <= 1'b0;
      @(negedge clk);
      checks++;
      if (!vld || int'(data) != ref_sample(n % DEPTH)) begin
        failures++;
        $display("FAIL: sample %0d got %0d (valid %0b) expected %0d", n, data, vld, ref_sample(n % DEPTH));
      end
      if (int'(data) > peak) begin peak = int'(data); peak_n = n; end
      repeat ($urandom_range(0, 3)) @(posedge clk);
      @(negedge clk);
      checks++; if (vld) begin failures++; $display("FAIL: valid held high"); end
    end
    checks++;
    if (peak_n != 52) begin failures++; $display("FAIL: R peak at %0d", peak_n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_ecg_rom
