// FIR filter of the transmitter, channel and receiver.
//
// y[n] = sum_{k=0}^{TAPS-1} b_k x[n-k], with 23 signed 16-bit coefficients
// (12 useful bits) and 12-bit signed samples. The full-precision sum is
// brought back to 12 bits by an arithmetic right shift of OUT_SHIFT with
// saturation, so with OUT_SHIFT = 11 a coefficient of 2048 has gain 1.
//
// Coefficients arrive through a reload channel: one coefficient per cycle
// with 'reload_valid', b_{TAPS-1} first and b_0 last, the last one marked by
// 'reload_last'. They collect in a shadow set and all take effect together
// on the last one, so the filter never runs with a half-loaded set.
// 'reload_ready' is always high. 'bypass' passes the input straight to the
// output register (the filter is "none").
//
// Timing: on each 'en' the new sample enters the delay line and dout is
// updated with the sum that already includes it: one sample of latency,
// group delay aside. The direct-form structure and the output window are
// this design's choice.
module fir_filter #(
  parameter int unsigned TAPS      = 23,
  parameter int unsigned DW        = 12,
  parameter int unsigned CW        = 16,
  parameter int unsigned OUT_SHIFT = 11
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic                 bypass,
  input  logic signed [DW-1:0] din,
  output logic signed [DW-1:0] dout,
  input  logic                 reload_valid,
  input  logic                 reload_last,
  input  logic signed [CW-1:0] reload_data,
  output logic                 reload_ready
);
  localparam int unsigned AW = DW + CW + $clog2(TAPS) + 1;

  logic signed [CW-1:0] coef   [TAPS];
  logic signed [CW-1:0] shadow [TAPS];
  logic signed [DW-1:0] dl     [TAPS-1];     // x[n-1] .. x[n-TAPS+1]
  logic [$clog2(TAPS)-1:0] ridx;
  logic signed [AW-1:0] acc;
  logic signed [AW-1:0] shifted;

  assign reload_ready = 1'b1;

  always_comb begin
    acc = AW'(din) * AW'(coef[0]);
    for (int k = 1; k < TAPS; k++)
      acc += AW'(dl[k-1]) * AW'(coef[k]);
    shifted = acc >>> OUT_SHIFT;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < TAPS; k++) begin
        coef[k]   <= '0;
        shadow[k] <= '0;
      end
      for (int k = 0; k < TAPS - 1; k++) dl[k] <= '0;
      ridx <= $bits(ridx)'(TAPS - 1);
      dout <= '0;
    end else begin
      if (reload_valid) begin
        shadow[ridx] <= reload_data;
        if (reload_last) begin
          for (int k = 0; k < TAPS; k++)
            coef[k] <= (k == int'(ridx)) ? reload_data : shadow[k];
          ridx <= $bits(ridx)'(TAPS - 1);
        end else begin
          ridx <= (ridx == 0) ? $bits(ridx)'(TAPS - 1) : ridx - 1'b1;
        end
      end
      if (en) begin
        dl[0] <= din;
        for (int k = 1; k < TAPS - 1; k++) dl[k] <= dl[k-1];
        if (bypass)
          dout <= din;
        else if (shifted > AW'(2**(DW-1) - 1))
          dout <= DW'(2**(DW-1) - 1);
        else if (shifted < -AW'(2**(DW-1) - 1))
          dout <= -DW'(2**(DW-1) - 1);
        else
          dout <= DW'(shifted);
      end
    end
  end
endmodule
