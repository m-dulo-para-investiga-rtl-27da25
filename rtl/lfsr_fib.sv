// Fibonacci LFSR that advances STEP times per enable and returns the STEP
// bits it shifted out, oldest in bit 0.
//
// The recurrence s[t+L] = s[t] XOR s[t+K] has period 2^L - 1 when
// x^L + x^K + 1 is primitive. The register holds s[t] (bit 0) to
// s[t+L-1] (bit L-1) and is loaded with SEED on reset.
module lfsr_fib #(
  parameter int unsigned L    = 23,
  parameter int unsigned K    = 5,
  parameter int unsigned STEP = 9,
  parameter logic [L-1:0] SEED = L'(1)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            en,
  output logic [STEP-1:0] bits
);
  logic [L-1:0] r, nxt;

  always_comb begin
    nxt = r;
    for (int s = 0; s < int'(STEP); s++) begin
      bits[s] = nxt[0];
      nxt     = {nxt[0] ^ nxt[K], nxt[L-1:1]};
    end
  end

  always_ff @(posedge clk) begin
    if (rst)     r <= SEED;
    else if (en) r <= nxt;
  end
endmodule
