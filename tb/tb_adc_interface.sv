// tb_adc_interface: self-checking test of the PMOD ADC serial interface.
//
// Two behavioural converters are driven with random 12-bit values; each frame
// the testbench checks both parallel outputs against the values the models
// sampled, the number of serial clock rising edges while chip select is low
// (15), the latency from start_tick to pvalid (30*SCLK_HALF+1 clocks), that
// pclk is high exactly for counter values above 8, and that start ticks
// during a frame are ignored.
module tb_adc_interface;
  import ecg_pkg::*;

  localparam int unsigned SCLK_HALF = 3;
  localparam int unsigned LATENCY   = 30 * SCLK_HALF + 1;
  localparam int unsigned NFRAMES   = 200;

  logic clk = 1'b0;
  logic rst;
  logic start_tick;
  logic sdata1, sdata2, adc_sclk, adc_cs_bar, pclk, pvalid;
  adc_word_t pdata1, pdata2;
  logic [11:0] v1, v2;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  adc_interface #(.SCLK_HALF(SCLK_HALF)) dut (
    .clk, .rst, .start_tick, .sdata1, .sdata2,
    .adc_sclk, .adc_cs_bar, .pclk, .pvalid, .pdata1, .pdata2
  );

  adcs7476_model adc1 (.cs_bar(adc_cs_bar), .sclk(adc_sclk), .value(v1), .sdata(sdata1));
  adcs7476_model adc2 (.cs_bar(adc_cs_bar), .sclk(adc_sclk), .value(v2), .sdata(sdata2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // count rising sclk edges while cs is low (cs as it was before the edge)
  int   rises;
  logic cs_before = 1'b1;
  always @(negedge clk) cs_before <= adc_cs_bar;
  always @(posedge adc_sclk) if (!cs_before) rises++;

  // pclk must equal (internal counter > 8); the counter is the number of
  // rising sclk edges since chip select fell
  always @(negedge clk) begin
    if (!rst && !adc_cs_bar) begin
      checks++;
      if (pclk !== (rises > 8)) begin
        failures++;
        $display("FAIL: pclk=%0b with %0d rising edges", pclk, rises);
      end
    end
  end

  initial begin : watchdog
    repeat (NFRAMES * (LATENCY + 20) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [11:0] e1, e2;
    int lat;
    rst = 1'b1;
    start_tick = 1'b0;
    v1 = '0;
    v2 = '0;
    rises = 0;
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    repeat (3) @(posedge clk);
    check(adc_cs_bar && adc_sclk && !pvalid, "idle state after reset");
    for (int f = 0; f < NFRAMES; f++) begin
      e1 = 12'($urandom);
      e2 = 12'($urandom);
      if (f == 0) begin e1 = 12'hFFF; e2 = 12'h000; end
      if (f == 1) begin e1 = 12'h000; e2 = 12'hFFF; end
      if (f == 2) begin e1 = 12'h800; e2 = 12'h001; end
      v1 = e1;
      v2 = e2;
      rises = 0;
      start_tick <= 1'b1;
      @(posedge clk);
      start_tick <= 1'b0;
      lat = 0;
      while (!pvalid) begin
        @(posedge clk);
        lat++;
        // stray ticks in the middle of a frame must be ignored
        if (lat == 10) start_tick <= 1'b1;
        if (lat == 11) start_tick <= 1'b0;
        // change the analog input after the sample was taken
        if (lat == 2) begin v1 = 12'($urandom); v2 = 12'($urandom); end
        if (lat > LATENCY + 5) break;
      end
      check(lat == LATENCY, $sformatf("latency %0d, expected %0d", lat, LATENCY));
      check(pdata1 == e1, $sformatf("frame %0d ch1 got %03h expected %03h", f, pdata1, e1));
      check(pdata2 == e2, $sformatf("frame %0d ch2 got %03h expected %03h", f, pdata2, e2));
      check(rises == 15, $sformatf("%0d sclk rises with cs low", rises));
      @(posedge clk);
      check(adc_cs_bar && !pvalid, "cs high and pvalid single pulse after frame");
      repeat ($urandom_range(0, 7)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_adc_interface
