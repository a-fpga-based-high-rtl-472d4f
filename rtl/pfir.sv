// pfir: fully parallel FIR filter in transposed form (the "PFIR" structure).
//
// Every new input sample PFIR_in is broadcast to NTAPS multipliers, one per
// coefficient. Product 0 is loaded into the first partial-sum register; the
// output of register i plus product i+1 is loaded into register i+1, and the
// last register plus the last product is the filter sum. With coefficient k
// in multiplier k this computes
//   y[n] = sum_k COEFS[NTAPS-1-k] * x[n-k],
// which for the symmetric (linear-phase) coefficient sets of pfir_pkg is the
// ordinary convolution with COEFS. The sum is rounded to nearest, shifted
// right by COEF_FRAC and saturated to OUT_W bits.
//
// Interface: in_valid/pfir_in carry one sample per strobe; out_valid/pfir_out
// follow exactly one clock later. The filter state only advances on in_valid,
// so any sample rate up to one sample per clock works. Synchronous active-high
// reset clears the partial sums.
//
// The structure (broadcast input, product into register, register plus next
// product) follows the document's PFIR figure; the coefficient format,
// rounding, saturation and output register are choices of this design.
module pfir
  import pfir_pkg::*;
#(
  parameter int unsigned NTAPS     = FILTER_NOTCH_TAPS,
  parameter int unsigned IN_W      = 16,
  parameter int unsigned OUT_W     = 16,
  parameter int unsigned CW        = COEF_W,
  parameter int unsigned CFRAC     = COEF_FRAC,
  parameter logic signed [CW-1:0] COEFS [NTAPS] = FILTER_NOTCH
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  pfir_in,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] pfir_out
);
  localparam int unsigned ACC_W = IN_W + CW + $clog2(NTAPS + 1);

  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t prod    [NTAPS];
  acc_t reg_out [NTAPS-1];
  acc_t sum_out;
  acc_t rounded;

  localparam acc_t OUT_MAX = acc_t'((64'sd1 <<< (OUT_W - 1)) - 1);
  localparam acc_t OUT_MIN = acc_t'(-(64'sd1 <<< (OUT_W - 1)));

  always_comb begin
    for (int i = 0; i < NTAPS; i++) begin
      prod[i] = acc_t'(pfir_in) * acc_t'(COEFS[i]);
    end
    sum_out = reg_out[NTAPS-2] + prod[NTAPS-1];
    rounded = (sum_out + acc_t'(acc_t'(1) <<< (CFRAC - 1))) >>> CFRAC;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NTAPS - 1; i++) reg_out[i] <= '0;
      out_valid <= 1'b0;
      pfir_out  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        reg_out[0] <= prod[0];
        for (int i = 1; i < NTAPS - 1; i++) reg_out[i] <= reg_out[i-1] + prod[i];
        if (rounded > OUT_MAX)      pfir_out <= OUT_MAX[OUT_W-1:0];
        else if (rounded < OUT_MIN) pfir_out <= OUT_MIN[OUT_W-1:0];
        else                        pfir_out <= rounded[OUT_W-1:0];
      end
    end
  end

  // every input strobe gives exactly one output strobe one clock later
  a_one_clock_latency: assert property (@(posedge clk) disable iff (rst)
    in_valid |=> out_valid);
  a_no_spurious_output: assert property (@(posedge clk) disable iff (rst)
    !in_valid |=> !out_valid);

  initial begin
    assert (NTAPS >= 2) else $fatal(1, "pfir needs at least two taps");
    assert (CFRAC >= 1 && CFRAC < CW + IN_W) else $fatal(1, "bad CFRAC");
  end
endmodule : pfir
