// ecg_pkg: types and constants shared by the ECG acquisition and analysis
// blocks.
//
// Samples travel through the chain as 16-bit signed values. The 12-bit
// unsigned converter (or ROM) value enters the first filter zero-extended, so
// the DC level of the ECG stays in the signal; the wave analyzer measures it
// and reports the P/Q/R/S/T amplitudes against it.
package ecg_pkg;
  localparam int unsigned ADC_W    = 12;  // converter resolution
  localparam int unsigned SAMPLE_W = 16;  // width of the filtered ECG data

  typedef logic        [ADC_W-1:0]    adc_word_t;
  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [SAMPLE_W:0]   amp_t;     // amplitude relative to DC
  typedef logic signed [15:0]         pos_t;     // sample position in frame
  typedef logic        [15:0]         ms_t;      // interval in milliseconds

  // Result of one analysed frame. Positions count samples from the first
  // sample of the frame (P may lie before it, T after its end).
  typedef struct packed {
    sample_t dc_value;
    amp_t    p_val;
    amp_t    q_val;
    amp_t    r_val;
    amp_t    s_val;
    amp_t    t_val;
    pos_t    p_idx;
    pos_t    q_idx;
    pos_t    r_idx;
    pos_t    s_idx;
    pos_t    t_idx;
    ms_t     pr_interval;
    ms_t     qrs_interval;
    ms_t     qt_interval;
    ms_t     st_interval;
    ms_t     p_width;      // wave durations at half amplitude
    ms_t     q_width;
    ms_t     r_width;
    ms_t     s_width;
    ms_t     t_width;
  } wave_result_t;
endpackage : ecg_pkg
