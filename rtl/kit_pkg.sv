// Shared types and constants of the baseband communication kit.
//
// The chain carries every analog-like quantity as a 12-bit two's complement
// sample (full scale +/-2047). A line-coded symbol level travels as a 2-bit
// two's complement value: 01 = +V, 00 = 0, 11 = -V. The eight line codes are
// numbered in the order unipolar NRZ, unipolar RZ, polar NRZ, polar RZ,
// Manchester, bipolar (AMI) NRZ, bipolar RZ, CMI.
//
// The configuration RAM is addressed in divisions of 64 words (sequence
// generator, FIFO/probes, pulse shaping, filters, noise, receiver). Where a
// word position could be fixed from the block description it follows it
// (words 0, 1, 3, 128-130, 192-229, 256); the others are this design's own.
package kit_pkg;

  localparam int unsigned DW = 12;           // chain sample width
  localparam int unsigned TAPS = 23;         // FIR filter length
  localparam int unsigned CW = 16;           // coefficient width (12 useful bits)

  typedef logic signed [DW-1:0] sample_t;

  typedef enum logic [1:0] {
    LVL_ZERO = 2'b00,
    LVL_POS  = 2'b01,
    LVL_NEG  = 2'b11
  } level_e;

  typedef enum logic [2:0] {
    LC_UNI_NRZ = 3'd0,
    LC_UNI_RZ  = 3'd1,
    LC_POL_NRZ = 3'd2,
    LC_POL_RZ  = 3'd3,
    LC_MANCH   = 3'd4,
    LC_BIP_NRZ = 3'd5,
    LC_BIP_RZ  = 3'd6,
    LC_CMI     = 3'd7
  } line_code_e;

  // True for the codes whose received signal has three levels (+V, 0, -V).
  function automatic logic is_three_level(line_code_e c);
    return (c == LC_POL_RZ) || (c == LC_BIP_NRZ) || (c == LC_BIP_RZ);
  endfunction

  // True for the codes whose second half-symbol is always 0.
  function automatic logic is_rz(line_code_e c);
    return (c == LC_UNI_RZ) || (c == LC_POL_RZ) || (c == LC_BIP_RZ);
  endfunction

  // Configuration RAM word addresses.
  localparam int unsigned A_NCELLS    = 0;   // [4:0] register length n (0 means 32)
  localparam int unsigned A_SEED      = 1;   // [31:0] seed
  localparam int unsigned A_CLKDIV    = 2;   // [31:0] system clocks per sample
  localparam int unsigned A_SGCTRL    = 3;   // [3] mode (1=Step-by-Step) [2] sel (1=PRBS) [1] reset seed [0] reset clock
  localparam int unsigned A_PROBE     = 64;  // [18:16] channel 2 point, [2:0] channel 1 point
  localparam int unsigned A_FIFOEN    = 65;  // [1] enable CH2, [0] enable CH1
  localparam int unsigned A_LCODE     = 128; // [2:0] line code
  localparam int unsigned A_AMP       = 129; // [11:0] signal amplitude A (factor*2047)
  localparam int unsigned A_DUTY      = 130; // [8:1] duty cycle %, [0] duty cycle enable
  localparam int unsigned A_SF        = 192; // [7:0] samples per symbol
  localparam int unsigned A_FILTCTRL  = 193; // [3] interpolate (raised cosine) [2] channel filter on [1] tx/rx filter on [0] reset filters
  localparam int unsigned A_TXCOEF    = 194; // 12 words: C(2k) low half, C(2k+1) high half
  localparam int unsigned A_CHCOEF    = 206;
  localparam int unsigned A_RXCOEF    = 218;
  localparam int unsigned A_NOISE_SD  = 256; // [11:0] standard deviation (2047 = full scale), [31] noise on
  localparam int unsigned A_RX_UP     = 384; // [11:0] upper threshold
  localparam int unsigned A_RX_LO     = 385; // [11:0] lower threshold
  localparam int unsigned A_RX_MEM    = 386; // [2:0] log2 of CRC memory size (0..5)
  localparam int unsigned A_RX_PHASE  = 387; // [7:0] sampling phase

  // Saturate a wide signed value into a chain sample.
  function automatic sample_t sat12(input logic signed [31:0] v);
    if (v > 32'sd2047) return 12'sd2047;
    if (v < -32'sd2047) return -12'sd2047;
    return sample_t'(v);
  endfunction

endpackage
