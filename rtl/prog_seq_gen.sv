// Programmed cyclic sequence generator.
//
// The same 32-cell register as the PRBS generator without the feedback
// taps: the n active cells rotate right by one cell per step (the least
// significant cell wraps into the most significant active cell), so the
// seed pattern repeats every n symbols. Cells at or above n are cleared.
// For n = 3 and seed 5 the word runs 5, 6, 3, 5, ...
//
// Interface: 'load' copies the seed, 'en' advances one step; 'state' is
// registered and its bit 0 is the transmitted bit.
module prog_seq_gen #(
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
  logic [5:0]       n;
  logic [N_MAX-1:0] active, nxt, shr;

  always_comb begin
    n = (ncells == 5'd0) ? 6'd32 : {1'b0, ncells};
    shr = state >> 1;
    for (int i = 0; i < N_MAX; i++) begin
      active[i] = (i < int'(n));
      if (!active[i])               nxt[i] = 1'b0;
      else if (i == int'(n) - 1)    nxt[i] = state[0];
      else                          nxt[i] = shr[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst)       state <= '0;
    else if (load) state <= seed & active;
    else if (en)   state <= nxt;
  end
endmodule
