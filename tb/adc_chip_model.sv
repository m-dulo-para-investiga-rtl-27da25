// Behavioural model of one ADCS7476 serial 12-bit ADC, for testbenches.
// A falling nCS samples the input code ('vin', 0..4095) and puts the
// first of four leading zeros on SDATA; each falling SCLK edge while nCS
// is low moves to the next bit, so the frame is 0000 followed by the
// 12-bit result, MSB first. 'nconv' counts conversions started.
module adc_chip_model (
  input  logic        sclk,
  input  logic        ncs,
  input  logic [11:0] vin,
  output logic        sdata,
  output int          nconv
);
  logic [15:0] frame = '0;
  int pos = 0;
  initial begin sdata = 1'b0; nconv = 0; end
  always @(negedge ncs) begin
    frame = {4'b0000, vin};
    pos = 15;
    sdata = frame[15];
    nconv++;
  end
  always @(negedge sclk) begin
    if (!ncs && pos > 0) begin
      pos--;
      sdata = frame[pos];
    end
  end
endmodule
