// Probe selector: picks two of the chain's test points as probe channels
// 1 and 2, which go to the capture FIFO and the probe DAC. Test points are
// 12-bit samples; a 1-bit point (data, clock) is given as 0 / 2047.
// Purely combinational; a selector beyond the last point reads 0.
module probe_mux
  import kit_pkg::*;
#(
  parameter int unsigned NPTS = 8
) (
  input  sample_t    pts [NPTS],
  input  logic [2:0] sel1,
  input  logic [2:0] sel2,
  output sample_t    ch1,
  output sample_t    ch2
);
  assign ch1 = (32'(sel1) < NPTS) ? pts[sel1] : '0;
  assign ch2 = (32'(sel2) < NPTS) ? pts[sel2] : '0;
endmodule
