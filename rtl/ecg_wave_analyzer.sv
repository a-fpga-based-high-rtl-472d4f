// ecg_wave_analyzer: time-domain analysis of the filtered ECG (the magnitude
// and phase comparator).
//
// The input stream is cut into frames of FRAME_LEN samples. While a frame
// arrives the block sums its samples (for the DC level, the zero origin of
// the unsigned ECG) and tracks its largest sample, taken as the R peak. All
// samples are also written into a circular buffer of 2**BUF_AW entries. Once
// TW samples have arrived after the R peak, the buffer is scanned from R-PW
// to R+TW, one sample per clock:
//   P = largest sample in  [R-PW, R-QW-1]     Q = smallest in [R-QW, R-1]
//   S = smallest sample in [R+1,  R+SW]       T = largest  in [R+SW+1, R+TW]
// The result gives each wave's value relative to the DC level, its position
// counted from the first sample of the frame, and four intervals in ms,
// measured between wave peaks: PR = Q-P, QRS = S-Q, QT = T-Q, ST = T-S.
// ms = samples * 1000 / FS_HZ, rounded. A second pass over the same samples
// gives each wave's duration: the number of samples in the wave's window
// (R: from R-QW to R+SW) that lie beyond half of the wave's amplitude,
// measured from the DC level, on the wave's side (above it for P, R and T,
// below it for Q and S), converted to ms.
//
// Interface: in_valid/ecg_in deliver samples; res_valid pulses for one clock
// with the frame's result on res. Samples must be at least 8 clocks apart so
// that the two passes (2*(PW+TW)+8 clocks) end before the next frame is
// complete; a frame that completes while the previous one is still waiting
// or being scanned is not analysed and frame_dropped pulses. The first frame after reset only fills
// the history buffer and gives no result, so that the P search never reaches
// back before the first sample. Synchronous active-high reset (the buffer
// itself is not cleared). R always lies inside its frame, so the upper bits
// of res.r_idx are constant zero.
//
// The document names the quantities (DC value, maximum values and positions
// of P, R and T, minimum values and positions of Q and S, PR, QRS, QT and ST
// intervals, the time period of each wave) but not how they are found; the
// frame, the search windows, the peak-to-peak interval definitions and the
// half-amplitude wave durations are this design's own.
module ecg_wave_analyzer
  import ecg_pkg::*;
#(
  parameter int unsigned FRAME_LEN = 160,  // samples per analysed frame
  parameter int unsigned BUF_AW    = 9,    // log2 of the history buffer depth
  parameter int unsigned PW        = 60,   // P search reaches PW samples before R
  parameter int unsigned QW        = 12,   // Q search: QW samples before R
  parameter int unsigned SW        = 12,   // S search: SW samples after R
  parameter int unsigned TW        = 105,  // T search reaches TW samples after R
  parameter int unsigned FS_HZ     = 300   // sample rate, for the ms intervals
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  sample_t      ecg_in,
  output logic         res_valid,
  output wave_result_t res,
  output logic         frame_dropped
);
  typedef logic [BUF_AW-1:0] ptr_t;
  typedef logic signed [31:0] off_t;

  localparam int unsigned FW = $clog2(FRAME_LEN);
  localparam longint MS_Q16 = (64'd1000 << 16) / 64'(FS_HZ);

  typedef enum logic [2:0] {S_IDLE, S_SCAN, S_DRAIN, S_SCAN2, S_FINISH} state_t;

  sample_t mem [2**BUF_AW];

  // frame collection
  ptr_t            wr_ptr;
  logic [FW-1:0]   frame_cnt;
  sample_t         run_max;
  ptr_t            run_max_ptr;
  logic [FW-1:0]   run_max_pos;
  logic signed [31:0] run_sum;

  // frame waiting for / under analysis
  logic            pending;
  logic            primed;       // a frame has completed since reset
  ptr_t            r_ptr;
  logic [FW-1:0]   r_pos;
  sample_t         r_sample;
  logic signed [31:0] dc_sum;
  ptr_t            age;          // samples written after R

  // scan
  state_t          state;
  off_t            k;            // offset being read
  off_t            k_d;          // offset of rd_data
  logic            rd_en_d;
  sample_t         rd_data;
  sample_t         p_max, q_min, s_min, t_max;
  off_t            p_off, q_off, s_off, t_off;
  logic            scan_last_d;
  logic            pass2_d;      // rd_data belongs to pass 2
  sample_t         dc_l;         // DC level of the frame under analysis
  amp_t            half_p, half_q, half_r, half_s, half_t;
  off_t            cnt_p, cnt_q, cnt_r, cnt_s, cnt_t;
  amp_t            rd_amp;

  // collection values including the sample now arriving
  sample_t         max_now;
  ptr_t            max_ptr_now;
  logic [FW-1:0]   max_pos_now;
  logic signed [31:0] sum_now;
  logic            frame_end;

  always_comb begin
    if (frame_cnt == '0 || ecg_in > run_max) begin
      max_now     = ecg_in;
      max_ptr_now = wr_ptr;
      max_pos_now = frame_cnt;
    end else begin
      max_now     = run_max;
      max_ptr_now = run_max_ptr;
      max_pos_now = run_max_pos;
    end
    sum_now   = ((frame_cnt == '0) ? 32'sd0 : run_sum) + 32'(ecg_in);
    frame_end = in_valid && (frame_cnt == FW'(FRAME_LEN - 1));
    rd_amp    = amp_t'(rd_data) - amp_t'(dc_l);
  end

  // history buffer: one write port, one synchronous read port
  always_ff @(posedge clk) begin
    if (in_valid) mem[wr_ptr] <= ecg_in;
    rd_data <= mem[ptr_t'(r_ptr + ptr_t'(k))];
  end

  function automatic ms_t to_ms(off_t samples);
    longint v;
    v = (longint'(samples) * MS_Q16 + 64'sd32768) >>> 16;
    return v[15:0];
  endfunction

  function automatic pos_t pos_of(logic [FW-1:0] rp, off_t off);
    return pos_t'(32'(rp) + off);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr        <= '0;
      frame_cnt     <= '0;
      run_max       <= '0;
      run_max_ptr   <= '0;
      run_max_pos   <= '0;
      run_sum       <= '0;
      pending       <= 1'b0;
      primed        <= 1'b0;
      r_ptr         <= '0;
      r_pos         <= '0;
      r_sample      <= '0;
      dc_sum        <= '0;
      age           <= '0;
      state         <= S_IDLE;
      k             <= '0;
      k_d           <= '0;
      rd_en_d       <= 1'b0;
      scan_last_d   <= 1'b0;
      pass2_d       <= 1'b0;
      dc_l          <= '0;
      half_p <= '0; half_q <= '0; half_r <= '0; half_s <= '0; half_t <= '0;
      cnt_p <= '0; cnt_q <= '0; cnt_r <= '0; cnt_s <= '0; cnt_t <= '0;
      p_max <= '0; q_min <= '0; s_min <= '0; t_max <= '0;
      p_off <= '0; q_off <= '0; s_off <= '0; t_off <= '0;
      res_valid     <= 1'b0;
      res           <= '0;
      frame_dropped <= 1'b0;
    end else begin
      res_valid     <= 1'b0;
      frame_dropped <= 1'b0;

      // ---- collection of the incoming frame ----
      if (in_valid) begin
        wr_ptr      <= wr_ptr + ptr_t'(1);
        run_max     <= max_now;
        run_max_ptr <= max_ptr_now;
        run_max_pos <= max_pos_now;
        run_sum     <= sum_now;
        frame_cnt   <= frame_end ? '0 : frame_cnt + FW'(1);
        if (pending) age <= age + ptr_t'(1);
      end
      if (frame_end) begin
        primed <= 1'b1;
        if (!primed) begin
          // first frame: history only
        end else if (pending) begin
          frame_dropped <= 1'b1;
        end else begin
          pending  <= 1'b1;
          r_ptr    <= max_ptr_now;
          r_pos    <= max_pos_now;
          r_sample <= max_now;
          dc_sum   <= sum_now;
          age      <= wr_ptr - max_ptr_now;
        end
      end

      // ---- scan of the buffered beat: pass 1 peaks, pass 2 widths ----
      rd_en_d     <= (state == S_SCAN) || (state == S_SCAN2);
      pass2_d     <= (state == S_SCAN2);
      k_d         <= k;
      scan_last_d <= (state == S_SCAN || state == S_SCAN2) && (k == off_t'(TW));
      case (state)
        S_IDLE: begin
          if (pending && !frame_end && 32'(age) >= 32'(TW)) begin
            state <= S_SCAN;
            k     <= -off_t'(PW);
            dc_l  <= sample_t'(dc_sum / $signed(32'(FRAME_LEN)));
            p_max <= sample_t'(-(2 ** (SAMPLE_W - 1)));
            t_max <= sample_t'(-(2 ** (SAMPLE_W - 1)));
            q_min <= sample_t'(2 ** (SAMPLE_W - 1) - 1);
            s_min <= sample_t'(2 ** (SAMPLE_W - 1) - 1);
            p_off <= -off_t'(PW);
            q_off <= -off_t'(QW);
            s_off <= 32'sd1;
            t_off <= off_t'(SW + 1);
          end
        end
        S_SCAN, S_SCAN2: begin
          k <= k + 32'sd1;
          if (k == off_t'(TW)) state <= (state == S_SCAN) ? S_DRAIN : S_FINISH;
        end
        S_DRAIN: begin
          // peaks are final once the last read of pass 1 is processed
          if (!rd_en_d && !scan_last_d) begin
            state  <= S_SCAN2;
            k      <= -off_t'(PW);
            half_p <= (amp_t'(p_max) - amp_t'(dc_l)) >>> 1;
            half_q <= (amp_t'(q_min) - amp_t'(dc_l)) >>> 1;
            half_r <= (amp_t'(r_sample) - amp_t'(dc_l)) >>> 1;
            half_s <= (amp_t'(s_min) - amp_t'(dc_l)) >>> 1;
            half_t <= (amp_t'(t_max) - amp_t'(dc_l)) >>> 1;
            cnt_p <= '0; cnt_q <= '0; cnt_r <= '0; cnt_s <= '0; cnt_t <= '0;
          end
        end
        default: ;
      endcase

      if (rd_en_d && !pass2_d) begin
        if (k_d < -off_t'(QW)) begin
          if (rd_data > p_max) begin p_max <= rd_data; p_off <= k_d; end
        end else if (k_d < 0) begin
          if (rd_data < q_min) begin q_min <= rd_data; q_off <= k_d; end
        end else if (k_d > 0 && k_d <= off_t'(SW)) begin
          if (rd_data < s_min) begin s_min <= rd_data; s_off <= k_d; end
        end else if (k_d > off_t'(SW)) begin
          if (rd_data > t_max) begin t_max <= rd_data; t_off <= k_d; end
        end
      end

      // pass 2: samples beyond half the wave's amplitude, within its window
      if (rd_en_d && pass2_d) begin
        if (k_d < -off_t'(QW)) begin
          if (rd_amp >= half_p) cnt_p <= cnt_p + 32'sd1;
        end
        if (k_d >= -off_t'(QW) && k_d < 0) begin
          if (rd_amp <= half_q) cnt_q <= cnt_q + 32'sd1;
        end
        if (k_d >= -off_t'(QW) && k_d <= off_t'(SW)) begin
          if (rd_amp >= half_r) cnt_r <= cnt_r + 32'sd1;
        end
        if (k_d > 0 && k_d <= off_t'(SW)) begin
          if (rd_amp <= half_s) cnt_s <= cnt_s + 32'sd1;
        end
        if (k_d > off_t'(SW)) begin
          if (rd_amp >= half_t) cnt_t <= cnt_t + 32'sd1;
        end
      end

      if (state == S_FINISH && !rd_en_d && !scan_last_d) begin
        state   <= S_IDLE;
        pending <= 1'b0;
        res.dc_value     <= dc_l;
        res.p_val        <= amp_t'(p_max) - amp_t'(dc_l);
        res.q_val        <= amp_t'(q_min) - amp_t'(dc_l);
        res.r_val        <= amp_t'(r_sample) - amp_t'(dc_l);
        res.s_val        <= amp_t'(s_min) - amp_t'(dc_l);
        res.t_val        <= amp_t'(t_max) - amp_t'(dc_l);
        res.p_idx        <= pos_of(r_pos, p_off);
        res.q_idx        <= pos_of(r_pos, q_off);
        res.r_idx        <= pos_of(r_pos, 32'sd0);
        res.s_idx        <= pos_of(r_pos, s_off);
        res.t_idx        <= pos_of(r_pos, t_off);
        res.pr_interval  <= to_ms(q_off - p_off);
        res.qrs_interval <= to_ms(s_off - q_off);
        res.qt_interval  <= to_ms(t_off - q_off);
        res.st_interval  <= to_ms(t_off - s_off);
        res.p_width      <= to_ms(cnt_p);
        res.q_width      <= to_ms(cnt_q);
        res.r_width      <= to_ms(cnt_r);
        res.s_width      <= to_ms(cnt_s);
        res.t_width      <= to_ms(cnt_t);
        res_valid        <= 1'b1;
      end
    end
  end

  initial begin
    assert (QW >= 1 && QW < PW) else $fatal(1, "need 1 <= QW < PW");
    assert (SW >= 1 && SW < TW) else $fatal(1, "need 1 <= SW < TW");
    assert (TW < FRAME_LEN) else $fatal(1, "need TW < FRAME_LEN");
    assert (FRAME_LEN + PW + TW + 1 < 2 ** BUF_AW) else $fatal(1, "buffer too small");
  end
endmodule : ecg_wave_analyzer
