// Chain timing: clock enables derived from the single system clock.
//
// Every rate in the chain comes from one clock so that all blocks stay in
// step. 'fifo_tick' (B) fires twice per sample period, so the FIFO can store
// two probe channels per sample; 'smp_tick' (C) fires once per sample;
// 'sym_tick' (E) marks the first sample of each symbol (SF samples per
// symbol) and 'half_tick' (F) the first sample of the second half-symbol,
// used by return-to-zero codes. The ticks are one system-clock wide and
// coincide with 'smp_tick'; during a tick 'smp_idx' is the index, inside its
// symbol, of the sample the tick starts. 'run' low freezes all ticks (Step-by-Step mode while the FIFO is
// being read), 'reset_clk' restarts the counters.
//
// Here B, C, E and F are clock enables of the one clock rather than
// separate divided clock lines.
module clock_gen (
  input  logic        clk,
  input  logic        rst,
  input  logic        reset_clk,
  input  logic        run,
  input  logic [31:0] clk_div,   // system clocks per sample (>= 2)
  input  logic [7:0]  sf,        // samples per symbol (>= 2)
  output logic        fifo_tick,
  output logic        smp_tick,
  output logic        sym_tick,
  output logic        half_tick,
  output logic [7:0]  smp_idx
);
  logic [31:0] cnt;
  logic [31:0] div;
  logic [7:0]  sfv;
  logic [7:0]  idx_q;      // index of the sample in progress
  logic [7:0]  idx_next;   // index of the sample a tick starts

  assign div = (clk_div < 32'd2) ? 32'd2 : clk_div;
  assign sfv = (sf < 8'd2) ? 8'd2 : sf;

  always_ff @(posedge clk) begin
    if (rst || reset_clk) begin
      cnt     <= '0;
      idx_q   <= sfv - 8'd1;       // first tick lands on index 0
    end else if (run) begin
      if (cnt == div - 32'd1) begin
        cnt     <= '0;
        idx_q   <= idx_next;
      end else begin
        cnt <= cnt + 32'd1;
      end
    end
  end

  // Ticks are combinational on the counter so they line up with smp_idx.
  assign idx_next  = (idx_q >= sfv - 8'd1) ? 8'd0 : idx_q + 8'd1;
  assign smp_idx   = idx_next;
  assign smp_tick  = run && !rst && !reset_clk && (cnt == div - 32'd1);
  assign fifo_tick = run && !rst && !reset_clk && ((cnt == div - 32'd1) || (cnt == (div >> 1) - 32'd1));
  assign sym_tick  = smp_tick && (idx_next == 8'd0);
  assign half_tick = smp_tick && (idx_next == (sfv >> 1));
endmodule
