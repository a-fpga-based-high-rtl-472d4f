// tb_pfir_notch: self-checking test of the PFIR filter with the 50 Hz
// band-stop coefficient set (fs = 300 Hz).
//
// 1. Random 12-bit samples, then full-scale square waves that drive the
//    output into saturation: every output is compared bit-exactly with a
//    reference convolution computed here, y[n] = sat(round(sum h[k]x[n-k]/2^15)),
//    and must appear exactly one clock after its input.
// 2. Frequency response: a 50 Hz cosine (period 6 samples) of amplitude 1000
//    on a DC level of 2048 must come out with at most 1000/100 (40 dB)
//    ripple once the filter has filled; a 10 Hz cosine must keep its
//    amplitude within 3 %.
module tb_pfir_notch;
  import pfir_pkg::*;

  localparam int NT = FILTER_NOTCH_TAPS;
  localparam logic signed [15:0] H [NT] = FILTER_NOTCH;
  localparam real ATT_DB = 40.0;   // required attenuation at the stop frequency
  localparam int  STOP_PERIOD = 6; // 50 Hz at 300 Hz
  localparam int  PASS_PERIOD = 30;// 10 Hz at 300 Hz

  logic clk = 1'b0;
  logic rst, in_valid, out_valid;
  logic signed [15:0] din, dout;
  int checks = 0, failures = 0, saturations = 0;

  always #5 clk = ~clk;

  pfir #(.NTAPS(NT), .COEFS(H)) dut (
    .clk, .rst, .in_valid, .pfir_in(din), .out_valid, .pfir_out(dout)
  );

  longint hist [NT];

  task automatic push_ref(input int x, output int y);
    longint acc;
    for (int i = NT - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = x;
    acc = 0;
    for (int k = 0; k < NT; k++) acc += longint'(H[k]) * hist[k];
    acc = (acc + 64'sd16384) >>> 15;
    if (acc > 32767)  begin acc = 32767;  saturations++; end
    if (acc < -32768) begin acc = -32768; saturations++; end
    y = int'(acc);
  endtask

  // drive one sample; returns the filter output; checks it against the model
  task automatic step(input int x, output int y);
    int yr;
    push_ref(x, yr);
    din <= 16'(x);
    in_valid <= 1'b1;
    @(posedge clk);
    in_valid <= 1'b0;
    @(negedge clk);
    checks++;
    if (!out_valid || int'(dout) != yr) begin
      failures++;
      if (failures < 10) $display("FAIL: x=%0d got %0d (valid %0b) expected %0d", x, dout, out_valid, yr);
    end
    y = int'(dout);
    repeat ($urandom_range(0, 2)) @(posedge clk);
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL: out_valid without input"); end
  endtask

  task automatic tone(input int period, input real amp, input int n, output real ripple);
    int y, ymax, ymin;
    ymax = -100000; ymin = 100000;
    for (int i = 0; i < n; i++) begin
      step(2048 + int'($rtoi(amp * $cos(2.0 * 3.14159265358979 * i / period) + 1000.5) - 1000), y);
      if (i >= NT + period) begin
        if (y > ymax) ymax = y;
        if (y < ymin) ymin = y;
      end
    end
    ripple = (ymax - ymin) / 2.0;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int y;
    real r;
    for (int i = 0; i < NT; i++) hist[i] = 0;
    rst = 1'b1; in_valid = 1'b0; din = '0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    for (int i = 0; i < 400; i++) step(int'($urandom_range(0, 4095)), y);
    for (int i = 0; i < 300; i++) step(((i / (STOP_PERIOD / 2)) % 2 == 0) ? 32767 : -32768, y);
    for (int i = 0; i < 300; i++) step(((i / 15) % 2 == 0) ? 32767 : -32768, y);
    checks++;
    if (saturations == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    tone(STOP_PERIOD, 1000.0, NT + 200, r);
    checks++;
    if (r > 1000.0 / (10.0 ** (ATT_DB / 20.0)) + 1.0) begin
      failures++; $display("FAIL: stop-band ripple %f", r);
    end
    $display("stop-band tone: residual amplitude %0.1f of 1000", r);
    tone(PASS_PERIOD, 1000.0, NT + 200, r);
    checks++;
    if (r < 970.0 || r > 1030.0) begin failures++; $display("FAIL: pass-band amplitude %f", r); end
    $display("pass-band tone: amplitude %0.1f of 1000, %0d saturated outputs", r, saturations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_pfir_notch
