// Clock recovery circuit (CRC) of the receiver.
//
// Works on the decided level b of each received sample. An edge (c1) is a
// change of b from the previous sample. A counter (c2) numbers the samples
// since the last restart; it restarts on an edge, or after reaching its
// limit (c4), so that it keeps a half-symbol rhythm through runs without
// edges. On every edge the count reached is measured: the counter value of
// the previous sample, or limit+1 if the counter had just wrapped. The
// measure is clamped to {SF/2-2, SF/2-1, SF/2} (the ideal is SF/2-1, since
// the count starts at 0), so that RZ signals with two edges per symbol,
// jitter and wrong decisions are tolerated, and stored (c3) in a circular
// memory of 1, 2, 4, 8, 16 or 32 words. The limit c4 is the rounded mean of
// the memory, updated one sample after the store; a larger memory resists
// noise but follows rate changes more slowly. The memory starts filled with
// SF/2-1.
//
// The sampling instant ('smp_now', with smp_tick) is the sample whose
// count, after this tick's update, equals 'phase' (0..SF/2-1): it comes
// 'phase' samples after each half-symbol boundary.
//
// Timing: all registers update on smp_tick; c1, c2_next and smp_now are
// combinational on the current sample.
module clock_recovery
  import kit_pkg::*;
#(
  parameter int unsigned MEM_MAX = 32
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       smp_tick,
  input  level_e     b,
  input  logic [7:0] sf,
  input  logic [2:0] mem_log2,    // memory size 2^mem_log2, 0..5
  input  logic [7:0] phase,
  output logic       c1,
  output logic [7:0] c2,
  output logic [7:0] c3,
  output logic [7:0] c4,
  output logic       smp_now
);
  localparam int unsigned PW = $clog2(MEM_MAX);

  level_e     b_prev;
  logic       wrapped;
  logic [7:0] half, c2_next, obs, obs_c;
  logic [7:0] mem [MEM_MAX];
  logic [PW-1:0] ptr;
  logic [2:0] ml;
  logic [PW+8:0] sum;
  logic [7:0] avg;

  assign half = sf >> 1;
  assign ml   = (mem_log2 > 3'(PW)) ? 3'(PW) : mem_log2;
  assign c1   = (b != b_prev);

  always_comb begin
    obs   = wrapped ? c4 + 8'd1 : c2;
    obs_c = obs;
    if (obs_c < half - 8'd2) obs_c = half - 8'd2;
    if (obs_c > half)        obs_c = half;
    if (c1)              c2_next = 8'd0;
    else if (c2 >= c4)   c2_next = 8'd0;
    else                 c2_next = c2 + 8'd1;
    smp_now = smp_tick && (c2_next == phase);
    sum = '0;
    for (int k = 0; k < int'(MEM_MAX); k++)
      if (k < (1 << ml)) sum += (PW+9)'(mem[k]);
    avg = 8'((sum + ((PW+9)'(1) << ml >> 1)) >> ml);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      b_prev  <= LVL_ZERO;
      wrapped <= 1'b0;
      c2      <= '0;
      c3      <= half - 8'd1;
      c4      <= half - 8'd1;
      ptr     <= '0;
      for (int k = 0; k < int'(MEM_MAX); k++) mem[k] <= half - 8'd1;
    end else if (smp_tick) begin
      b_prev  <= b;
      c2      <= c2_next;
      wrapped <= !c1 && (c2 >= c4);
      c4      <= avg;
      if (c1) begin
        mem[ptr] <= obs_c;
        c3       <= obs_c;
        ptr      <= (32'(ptr) + 1 >= (32'd1 << ml)) ? '0 : ptr + 1'b1;
      end
    end
  end
endmodule
