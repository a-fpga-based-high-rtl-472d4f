// adc_interface: serial-to-parallel interface for the two 12-bit serial
// converters (ADCS7476 type) of a Digilent PMOD AD1 adapter.
//
// Both converters share one chip select (adc_cs_bar) and one serial clock
// (adc_sclk) and return their samples on sdata1 and sdata2. A conversion
// frame starts on start_tick: the bit counter wraps from 15 to 0 and the chip
// select goes low. adc_sclk runs with a period of 2*SCLK_HALF system clocks,
// starting high. At every rising edge of adc_sclk the counter counts up;
// once its new value is above 3 the serial bit is shifted into the LSB of the
// channel's shift register, so the four leading zeros of the frame are
// skipped and DB11..DB0 are kept. When the counter reaches 15 the shift
// register (with the bit just received) is copied to the 12-bit parallel
// output, pvalid pulses for one clock and chip select returns high, where it
// stays until the next start_tick. pclk is high while the counter is above 8.
//
// Timing: a frame takes 15*2*SCLK_HALF + 1 clocks from start_tick to pvalid.
// start_tick pulses that arrive during a frame are ignored.
//
// The counter thresholds (shift above 3, load at 15, pclk above 8, chip
// select high at 15) follow the document's description of the interface; the
// clock-enable based generation of adc_sclk, the idle state between frames
// and the start_tick input are choices of this design.
module adc_interface
  import ecg_pkg::*;
#(
  parameter int unsigned SCLK_HALF = 2   // system clocks per adc_sclk half period
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      start_tick,
  input  logic      sdata1,
  input  logic      sdata2,
  output logic      adc_sclk,
  output logic      adc_cs_bar,
  output logic      pclk,
  output logic      pvalid,
  output adc_word_t pdata1,
  output adc_word_t pdata2
);
  localparam int unsigned DIV_W = $clog2(SCLK_HALF + 1);

  logic [3:0]       count;
  logic [DIV_W-1:0] div_cnt;
  logic             busy;
  logic [ADC_W-2:0] spdata1, spdata2;   // DB11.. of the bits received so far
  logic [3:0]       count_next;
  logic             half_done;

  assign count_next = count + 4'd1;
  assign half_done  = (div_cnt == DIV_W'(SCLK_HALF - 1));
  assign pclk       = (count > 4'd8);

  always_ff @(posedge clk) begin
    if (rst) begin
      count      <= 4'd0;
      div_cnt    <= '0;
      busy       <= 1'b0;
      adc_sclk   <= 1'b1;
      adc_cs_bar <= 1'b1;
      pvalid     <= 1'b0;
      spdata1    <= '0;
      spdata2    <= '0;
      pdata1     <= '0;
      pdata2     <= '0;
    end else begin
      pvalid <= 1'b0;
      if (!busy) begin
        adc_sclk <= 1'b1;
        div_cnt  <= '0;
        if (start_tick) begin
          busy       <= 1'b1;
          count      <= 4'd0;
          adc_cs_bar <= 1'b0;
        end
      end else if (half_done) begin
        div_cnt  <= '0;
        adc_sclk <= ~adc_sclk;
        if (!adc_sclk) begin
          // rising edge of adc_sclk
          count <= count_next;
          if (count_next > 4'd3) begin
            spdata1 <= {spdata1[ADC_W-3:0], sdata1};
            spdata2 <= {spdata2[ADC_W-3:0], sdata2};
          end
          if (count_next == 4'd15) begin
            pdata1     <= {spdata1, sdata1};
            pdata2     <= {spdata2, sdata2};
            pvalid     <= 1'b1;
            adc_cs_bar <= 1'b1;
            busy       <= 1'b0;
          end
        end
      end else begin
        div_cnt <= div_cnt + DIV_W'(1);
      end
    end
  end

  // frame rules: a word is delivered only as chip select is released, and the
  // serial clock only toggles while chip select is low
  a_pvalid_ends_frame: assert property (@(posedge clk) disable iff (rst)
    pvalid |-> adc_cs_bar && !busy);
  a_sclk_idle_high: assert property (@(posedge clk) disable iff (rst)
    adc_cs_bar && !busy |-> adc_sclk);

  initial assert (SCLK_HALF >= 1) else $fatal(1, "SCLK_HALF must be at least 1");
endmodule : adc_interface
