// syn_top_ecg: FPGA ECG acquisition, filtering and analysis chain.
//
// A sample timer divides the 50 MHz clock down to the filter sample rate
// FS_HZ (300 Hz). On each sample tick either the test-signal ROM or the PMOD
// ADC interface supplies a 12-bit ECG sample; the sim_or_real switch picks
// which (0: ROM, 1: ADC channel ECG_CHANNEL). The sample passes through the
// 50 Hz band-stop FIR and then the 0.05-100 Hz band-pass FIR (both in the
// parallel PFIR structure), and the filtered stream goes to the wave analyzer,
// which reports DC level, P/Q/R/S/T values and positions and the PR, QRS, QT
// and ST intervals once per frame.
//
// The short-time Fourier transform, with its frame memory, is a vendor FFT
// core in the original system and is not part of this RTL: the filtered
// stream is brought out on stft_din/stft_din_valid for such a core. Likewise
// the noisy and filtered signals are brought out (ecg_noisy, ecg_filtered)
// for an on-chip logic analyzer; ecg_noisy_valid marks each new source
// sample on ecg_noisy, one clock after it entered the notch filter. The
// source word is 12 bits wide, so the top 4 bits of ecg_noisy are zero.
//
// Timing: the ROM sample appears one clock after the tick, an ADC sample
// 15*2*SCLK_HALF+1 clocks after it; each filter adds one clock. The filters
// have linear-phase delays of 50 and 25 samples. sim_or_real is synchronised
// with two flip-flops. Synchronous active-high reset.
//
// Both converters of the PMOD are read; ECG_CHANNEL picks the one filtered
// (channel 2 by default, the channel the document's interface description
// uses). The interface's pclk output is not needed here, since pvalid marks
// each new word.
//
// The block order, the 50 MHz clock, the 12-bit converter, the 16-bit filtered
// data and the port names of the converter side follow the document; the
// sample timer, the switch encoding and the channel choice are this design's.
module syn_top_ecg
  import ecg_pkg::*;
  import pfir_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 50_000_000,
  parameter int unsigned FS_HZ       = 300,
  parameter int unsigned SCLK_HALF   = 2,     // ADC serial clock = CLK_HZ/(2*SCLK_HALF)
  parameter int unsigned ECG_CHANNEL = 2,     // ADC channel used in real mode (1 or 2)
  parameter int unsigned FRAME_LEN   = 160
) (
  input  logic         clk_50MHz,
  input  logic         rst,
  input  logic         sim_or_real,
  input  logic         adc_sdata1,
  input  logic         adc_sdata2,
  output logic         adc_clk_out,
  output logic         adc_cs_bar,
  // to the external STFT core
  output logic         stft_din_valid,
  output sample_t      stft_din,
  // probes for the on-chip logic analyzer
  output logic         ecg_noisy_valid,
  output sample_t      ecg_noisy,
  output sample_t      ecg_filtered,
  // time-domain analysis
  output logic         wave_valid,
  output wave_result_t wave_res,
  output logic         frame_dropped
);
  localparam int unsigned SAMPLE_DIV = CLK_HZ / FS_HZ;
  localparam int unsigned TW_ = $clog2(SAMPLE_DIV);

  logic clk;
  assign clk = clk_50MHz;

  // ---- sample timer ----
  logic [TW_-1:0] tick_cnt;
  logic           sample_tick;

  always_ff @(posedge clk) begin
    if (rst) begin
      tick_cnt    <= '0;
      sample_tick <= 1'b0;
    end else begin
      sample_tick <= (tick_cnt == TW_'(SAMPLE_DIV - 1));
      tick_cnt    <= (tick_cnt == TW_'(SAMPLE_DIV - 1)) ? '0 : tick_cnt + TW_'(1);
    end
  end

  // ---- source switch ----
  logic [1:0] sel_sync;
  logic       use_adc;

  always_ff @(posedge clk) begin
    if (rst) sel_sync <= '0;
    else     sel_sync <= {sel_sync[0], sim_or_real};
  end
  assign use_adc = sel_sync[1];

  logic      rom_valid;
  adc_word_t rom_data;

  ecg_rom #(.DEPTH(FRAME_LEN)) u_rom (
    .clk, .rst,
    .sample_tick(sample_tick && !use_adc),
    .ecg_valid  (rom_valid),
    .ecg_data   (rom_data)
  );

  logic      adc_pclk, adc_pvalid;
  adc_word_t adc_pdata1, adc_pdata2;

  adc_interface #(.SCLK_HALF(SCLK_HALF)) u_adc (
    .clk, .rst,
    .start_tick (sample_tick && use_adc),
    .sdata1     (adc_sdata1),
    .sdata2     (adc_sdata2),
    .adc_sclk   (adc_clk_out),
    .adc_cs_bar (adc_cs_bar),
    .pclk       (adc_pclk),
    .pvalid     (adc_pvalid),
    .pdata1     (adc_pdata1),
    .pdata2     (adc_pdata2)
  );

  logic    src_valid;
  sample_t src_data;

  always_comb begin
    if (use_adc) begin
      src_valid = adc_pvalid;
      src_data  = sample_t'({4'b0000, (ECG_CHANNEL == 2) ? adc_pdata2 : adc_pdata1});
    end else begin
      src_valid = rom_valid;
      src_data  = sample_t'(rom_data);
    end
  end

  // ---- 50 Hz noise removal, then high-frequency noise removal ----
  logic    notch_valid;
  sample_t notch_out;

  pfir #(.NTAPS(FILTER_NOTCH_TAPS), .COEFS(FILTER_NOTCH)) u_notch (
    .clk, .rst,
    .in_valid (src_valid),
    .pfir_in  (src_data),
    .out_valid(notch_valid),
    .pfir_out (notch_out)
  );

  logic    bpf_valid;
  sample_t bpf_out;

  pfir #(.NTAPS(FILTER_BPF_TAPS), .COEFS(FILTER_BPF)) u_bpf (
    .clk, .rst,
    .in_valid (notch_valid),
    .pfir_in  (notch_out),
    .out_valid(bpf_valid),
    .pfir_out (bpf_out)
  );

  // ---- time-domain analysis ----
  ecg_wave_analyzer #(.FRAME_LEN(FRAME_LEN), .FS_HZ(FS_HZ)) u_analyzer (
    .clk, .rst,
    .in_valid     (bpf_valid),
    .ecg_in       (bpf_out),
    .res_valid    (wave_valid),
    .res          (wave_res),
    .frame_dropped(frame_dropped)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      ecg_noisy_valid <= 1'b0;
      ecg_noisy       <= '0;
      ecg_filtered    <= '0;
    end else begin
      ecg_noisy_valid <= src_valid;
      if (src_valid) ecg_noisy    <= src_data;
      if (bpf_valid) ecg_filtered <= bpf_out;
    end
  end

  assign stft_din_valid = bpf_valid;
  assign stft_din       = bpf_out;

  initial assert (SAMPLE_DIV > 15 * 2 * SCLK_HALF + 4)
    else $fatal(1, "sample period shorter than an ADC frame");
endmodule : syn_top_ecg
