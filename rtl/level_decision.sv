// Level decision: compares a 12-bit sample with the upper and lower
// thresholds. Above the upper threshold the result is +V; for three-level
// codes, below the lower threshold it is -V; anything else is 0. For
// two-level codes the lower threshold is ignored, so every sample not above
// the upper threshold reads as 0. Purely combinational; the same rule is
// used before (clock recovery) and after sampling.
module level_decision
  import kit_pkg::*;
(
  input  sample_t x,
  input  sample_t up,
  input  sample_t lo,
  input  logic    three,
  output level_e  lvl
);
  always_comb begin
    if (x > up)              lvl = LVL_POS;
    else if (three && x < lo) lvl = LVL_NEG;
    else                     lvl = LVL_ZERO;
  end
endmodule
