// Receiver data recovery: from the receiver-filter output (point A) to the
// decoded bit stream (point F).
//
//  B   level decision of A (clock_recovery input)
//  C   clock recovery: edge c1, counter c2, stored count c3, limit c4
//  D1  A sampled at each sampling instant (two per symbol)
//  D2  the previous D1 (one half-symbol earlier)
//  D3  one-tick pulse after each sampling instant
//  D4  recovered clock: high while the next sample is a first half
//  D5  A at the sampling instants, delayed SF/2+1 sample ticks so it lines
//      up with F for display
//  E1  decision of the newest sample, E2 decision of the one before
//  F   decoded bit, updated when a second half has been sampled
//
// The two samples of a symbol are told apart by a half flag that toggles
// at every sampling instant. When the decoder reports a pair the line code
// cannot produce, the newest sample is taken as a first half instead (the
// flag slips by one half-symbol); NRZ codes need no alignment.
//
// Timing: registers update on smp_tick; 'bit_valid' pulses for one system
// clock each time f_bit is updated. Sampling twice per symbol, the decision
// thresholds shared by both decisions and the D5 delay follow the block
// description; the slip rule and pipeline are this design's own.
module data_recover
  import kit_pkg::*;
#(
  parameter int unsigned MEM_MAX = 32
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       smp_tick,
  input  sample_t    a,
  input  line_code_e code,
  input  logic [7:0] sf,
  input  sample_t    up,
  input  sample_t    lo,
  input  logic [2:0] mem_log2,
  input  logic [7:0] phase,
  output level_e     b,
  output logic       c1,
  output logic [7:0] c2,
  output logic [7:0] c3,
  output logic [7:0] c4,
  output sample_t    d1,
  output sample_t    d2,
  output logic       d3,
  output sample_t    d5,
  output level_e     e1,
  output level_e     e2,
  output logic       d4_clk,
  output logic       f_bit,
  output logic       bit_valid,
  output logic [15:0] slips
);
  logic       smp_now;
  level_e     e_now;
  logic       second;       // the next sample is a second half
  logic       dbit, dslip;
  logic       three;

  assign three = is_three_level(code);

  level_decision u_dec_b (.x(a), .up, .lo, .three, .lvl(b));
  level_decision u_dec_e (.x(a), .up, .lo, .three, .lvl(e_now));

  clock_recovery #(.MEM_MAX(MEM_MAX)) u_crc (
    .clk, .rst, .smp_tick, .b, .sf, .mem_log2, .phase,
    .c1, .c2, .c3, .c4, .smp_now);

  line_decoder u_ldec (.code, .e_first(e1), .e_second(e_now), .bit_out(dbit), .slip(dslip));

  // D5: ring buffer of sampled values, read SF/2+1 ticks behind
  sample_t    ring [256];
  logic [7:0] wp;
  sample_t    a_at_smp;

  always_ff @(posedge clk) begin
    if (rst) begin
      d1 <= '0; d2 <= '0; d3 <= 1'b0;
      e1 <= LVL_ZERO; e2 <= LVL_ZERO;
      second <= 1'b0; d4_clk <= 1'b1;
      f_bit <= 1'b0; bit_valid <= 1'b0;
      slips <= '0;
      a_at_smp <= '0; wp <= '0; d5 <= '0;
    end else if (!smp_tick) begin
      bit_valid <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      d3 <= smp_now;
      ring[wp] <= a_at_smp;
      wp <= wp + 8'd1;
      d5 <= ring[wp - ((sf >> 1) + 8'd1) + 8'd1];
      if (smp_now) begin
        a_at_smp <= a;
        d1 <= a;
        d2 <= d1;
        e1 <= e_now;
        e2 <= e1;
        if (!second) begin
          second <= 1'b1;
        end else if (dslip) begin
          second <= 1'b1;
          slips  <= slips + 16'd1;
        end else begin
          second    <= 1'b0;
          f_bit     <= dbit;
          bit_valid <= 1'b1;
        end
      end
      d4_clk <= !second;
    end
  end
endmodule
