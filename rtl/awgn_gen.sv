// Additive white Gaussian noise generator (inversion method).
//
// Five ROM levels (awgn_rom) hold the half-normal inverse CDF over a
// recursively partitioned [0,1). Each level is addressed by a 9-bit index
// from its own LFSR; the lengths differ (20, 22, 23, 25, 28) so the indexes
// are not correlated. Level 1 gives the output unless its index is the last
// segment (511); then level 2 is tried, and so on, level 5 being taken
// whatever its index. This reproduces a uniform x on [0,1) resolved down to
// 512^-5 in the tail. A sixth, longer LFSR (31 cells) gives the sign, and
// the sample becomes two's complement: 'z' is a unit-variance Gaussian
// sample in signed Q4.8. 'noise' is z scaled by the standard deviation
// word: noise = z*sd/256, saturated to +/-2047, so sd = 2047 means a
// standard deviation equal to full scale.
//
// Timing: z and noise are registered on 'en' (one sample per sample tick).
// The five-ROM structure, word format and LFSR indexing follow the
// block description; the LFSR lengths and the scaling are this design's.
module awgn_gen
  import kit_pkg::*;
#(
  parameter int unsigned K         = 5,
  parameter int unsigned ROM_DEPTH = 512,
  parameter int unsigned ROM_W     = 11,
  parameter int unsigned FRAC      = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [11:0] sd,
  output logic signed [ROM_W:0] z,
  output sample_t     noise
);
  localparam int unsigned IW = $clog2(ROM_DEPTH);
  localparam int unsigned LEN [6] = '{20, 22, 23, 25, 28, 31};
  localparam int unsigned TAP [6] = '{3, 1, 5, 3, 3, 3};

  logic [IW-1:0]    idx [K];
  logic [ROM_W-1:0] val [K];
  logic             sbit;
  logic [ROM_W-1:0] mag;
  logic signed [ROM_W:0] z_n;
  logic signed [31:0] prod;

  for (genvar g = 0; g < int'(K); g++) begin : g_lvl
    lfsr_fib #(.L(LEN[g]), .K(TAP[g]), .STEP(IW),
               .SEED(LEN[g]'(32'h5A3C_9E17 >> g) | LEN[g]'(1))) u_lfsr (
      .clk, .rst, .en, .bits(idx[g]));
    awgn_rom #(.LEVEL(g + 1), .DEPTH(ROM_DEPTH), .W(ROM_W), .FRAC(FRAC)) u_rom (
      .addr(idx[g]), .data(val[g]));
  end

  lfsr_fib #(.L(LEN[5]), .K(TAP[5]), .STEP(1), .SEED(31'h1357_9BDF)) u_sign (
    .clk, .rst, .en, .bits(sbit));

  // Priority: the first level whose index is not the last segment.
  always_comb begin
    mag = val[K-1];
    for (int g = int'(K) - 2; g >= 0; g--)
      if (idx[g] != IW'(ROM_DEPTH - 1)) mag = val[g];
    z_n  = sbit ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
    prod = (32'(z_n) * $signed({20'd0, sd})) >>> FRAC;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      z     <= '0;
      noise <= '0;
    end else if (en) begin
      z     <= z_n;
      noise <= sat12(prod);
    end
  end
endmodule
