// Behavioural model of one DAC121S101 serial 12-bit DAC, for testbenches.
// A falling nSYNC starts a frame; the chip takes DIN on each falling SCLK
// edge while nSYNC is low and, on the 16th, loads the low 12 bits of the
// frame into its output register ('vout'); the top four bits select the
// power-down mode and must be zero for normal operation ('mode').
module dac_chip_model (
  input  logic        sclk,
  input  logic        nsync,
  input  logic        din,
  output logic [11:0] vout,
  output logic [3:0]  mode,
  output int          nconv
);
  logic [15:0] sr = '0;
  int nbits = 0;
  initial begin vout = '0; mode = '0; nconv = 0; end
  always @(negedge nsync) nbits = 0;
  always @(negedge sclk) begin
    if (!nsync && nbits < 16) begin
      sr = {sr[14:0], din};
      nbits++;
      if (nbits == 16) begin
        vout = sr[11:0];
        mode = sr[15:12];
        nconv++;
      end
    end
  end
endmodule
