// Pseudo-random bit sequence generator of selectable length n = 3..32.
//
// Thirty-two flip-flops are always present; a per-cell control multiplexer
// decides whether a cell shifts (takes its left neighbour), shifts with
// feedback (neighbour XOR the least significant cell, where the polynomial
// ROM marks a tap), or is the most significant cell of the active register
// (takes the least significant cell, selected by a 5-to-32 decoder of n).
// Cells at or above n are cleared, so the 32-bit output word holds only the
// n active cells. This is the "modular" LFSR form, which keeps one XOR per
// cell instead of an n-input XOR chain.
//
// Interface: 'load' copies the seed (an all-zero seed becomes 1, since the
// all-zero state never leaves itself); 'en' advances one step, once per
// symbol. 'state' is registered; its bit 0 is the transmitted bit.
module prbs_gen #(
  parameter int unsigned N_MAX = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             load,
  input  logic [4:0]       ncells,   // 0 stands for 32
  input  logic [N_MAX-1:0] seed,
  output logic [N_MAX-1:0] state
);
  logic [31:0]      taps;
  logic [N_MAX-1:0] msb_mark;     // one-hot: most significant active cell
  logic [N_MAX-1:0] active;       // cells below n
  logic [N_MAX-1:0] nxt;
  logic [5:0]       n;
  logic [N_MAX-1:0] shr;          // state shifted right by one cell

  prbs_poly_rom u_rom (.ncells(ncells), .taps(taps));

  always_comb begin
    n = (ncells == 5'd0) ? 6'd32 : (ncells < 5'd3 ? 6'd3 : {1'b0, ncells});
    for (int i = 0; i < N_MAX; i++) begin
      msb_mark[i] = (i == int'(n) - 1);
      active[i]   = (i < int'(n));
    end
    shr = state >> 1;
    for (int i = 0; i < N_MAX; i++) begin
      if (!active[i])
        nxt[i] = 1'b0;
      else if (msb_mark[i])
        nxt[i] = state[0];
      else
        nxt[i] = shr[i] ^ (taps[i] & state[0]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst)
      state <= N_MAX'(1);
    else if (load)
      state <= ((seed & active) == '0) ? N_MAX'(1) : (seed & active);
    else if (en)
      state <= nxt;
  end
endmodule
