// adcs7476_model: behavioural model of one ADCS7476-type 12-bit serial
// converter (not synthesizable; testbench use only).
//
// On the falling edge of cs_bar it samples `value` and drives the first of 16
// frame bits (four leading zeros, then DB11..DB0, MSB first); every falling
// edge of sclk while cs_bar is low moves to the next bit. After the 16th bit,
// or when cs_bar rises, the output is released (driven 0 here, since the
// simulator has no high-impedance state). The analog input is the integer
// `value`.
module adcs7476_model (
  input  logic        cs_bar,
  input  logic        sclk,
  input  logic [11:0] value,
  output logic        sdata
);
  logic [15:0] frame;
  int          idx;

  initial begin
    sdata = 1'b0;
    idx   = 16;
    frame = '0;
  end

  always @(negedge cs_bar) begin
    frame = {4'b0000, value};
    idx   = 0;
    sdata = frame[15];
  end

  always @(negedge sclk) begin
    if (!cs_bar && idx < 16) begin
      idx   = idx + 1;
      sdata = (idx < 16) ? frame[15 - idx] : 1'b0;
    end
  end

  always @(posedge cs_bar) begin
    idx   = 16;
    sdata = 1'b0;
  end
endmodule : adcs7476_model
