// Level mapper and interpolator between the line coder and the transmitter
// filter.
//
// The 2-bit coded level becomes a 12-bit signed sample of amplitude +A, 0
// or -A, where A is the signal amplitude word (signal factor times 2047).
// With 'interp' set (the raised-cosine filter is in use) only the first
// sample of each symbol keeps its value and the others are forced to 0, so
// the FIR filter sees an impulse per symbol and its output is the sum of
// shifted raised-cosine pulses. Purely combinational.
module level_interp
  import kit_pkg::*;
(
  input  level_e     lc,
  input  logic [11:0] amp,
  input  logic       interp,
  input  logic       first,
  output sample_t    y
);
  sample_t a;
  assign a = (amp > 12'd2047) ? 12'sd2047 : sample_t'(amp);

  always_comb begin
    unique case (lc)
      LVL_POS: y = a;
      LVL_NEG: y = -a;
      default: y = '0;
    endcase
    if (interp && !first) y = '0;
  end
endmodule
