// ecg_rom: test-signal ROM holding one noisy ECG beat of DEPTH samples.
//
// On every sample_tick the ROM presents the next 12-bit unsigned sample on
// ecg_data (registered read, one clock after the tick, with ecg_valid high
// for that clock) and steps its address, wrapping after DEPTH samples so that
// the beat repeats.
//
// The document fills the ROM with a 160-sample beat made by an ECG generator
// and mixed with 50 Hz and 150 Hz sinusoidal interference. Those numbers are
// not published, so the contents here are computed at elaboration from a
// synthetic beat, with n the ROM address (see ecg_sample below):
//   x[n] = BASE + P + T (parabolic bumps) - Q + R - S (triangles)
//          + A50 * c6[n mod 6] + A150 * (-1)^n
// c6 = {2,1,-1,-2,-1,1}/2 is a 50 Hz cosine and (-1)^n a 150 Hz cosine at
// the 300 Hz sample rate of the filters. Wave positions: P at 12, Q at 43,
// R at 52, S at 61, T at 140.
module ecg_rom
  import ecg_pkg::*;
#(
  parameter int unsigned DEPTH = 160,
  parameter int          A50   = 100,   // 50 Hz interference amplitude (LSB)
  parameter int          A150  = 60     // 150 Hz interference amplitude (LSB)
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      sample_tick,
  output logic      ecg_valid,
  output adc_word_t ecg_data
);
  localparam int BASE = 1024;

  // Parabolic bump of height a and half-width w centred at c.
  function automatic int bump(int n, int c, int w, int a);
    int d;
    d = n - c;
    return (d > -w && d < w) ? (a * (w * w - d * d)) / (w * w) : 0;
  endfunction

  // Triangle of height a and half-width w centred at c.
  function automatic int tri_pulse(int n, int c, int w, int a);
    int d;
    d = (n > c) ? n - c : c - n;
    return (d < w) ? (a * (w - d)) / w : 0;
  endfunction

  function automatic adc_word_t ecg_sample(int n);
    int v;
    int c6;
    case (n % 6)
      0:       c6 = 2;
      1, 5:    c6 = 1;
      2, 4:    c6 = -1;
      default: c6 = -2;
    endcase
    v = BASE
      + bump(n, 12, 8, 160)
      - tri_pulse(n, 43, 5, 150)
      + tri_pulse(n, 52, 7, 1600)
      - tri_pulse(n, 61, 5, 300)
      + bump(n, 140, 14, 320)
      + (A50 * c6) / 2
      + ((n % 2 == 0) ? A150 : -A150);
    if (v < 0)    v = 0;
    if (v > 4095) v = 4095;
    return adc_word_t'(v);
  endfunction

  localparam int unsigned AW = $clog2(DEPTH);

  adc_word_t rom [DEPTH];
  logic [AW-1:0] addr;

  for (genvar i = 0; i < DEPTH; i++) begin : g_rom
    assign rom[i] = ecg_sample(i);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      addr      <= '0;
      ecg_valid <= 1'b0;
      ecg_data  <= '0;
    end else begin
      ecg_valid <= sample_tick;
      if (sample_tick) begin
        ecg_data <= rom[addr];
        addr     <= (addr == AW'(DEPTH - 1)) ? '0 : addr + AW'(1);
      end
    end
  end
endmodule : ecg_rom
