// Coefficient loader of one FIR filter.
//
// Filter coefficients live in the configuration RAM two per 32-bit word:
// word base+j holds b_{2j} in bits 15:0 and b_{2j+1} in bits 31:16. On
// 'start' the loader reads them and streams them into the filter's reload
// channel in reverse order (b_{TAPS-1} first), raising 'reload_last' with
// b_0. Each coefficient takes two cycles: an address cycle and, the RAM
// having one cycle of read latency, a data cycle. 'busy' is high from the
// cycle after 'start' until the last coefficient has been sent.
module coef_loader #(
  parameter int unsigned TAPS = 23
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [8:0]  base,
  output logic [8:0]  rd_addr,
  input  logic [31:0] rd_data,
  output logic        reload_valid,
  output logic        reload_last,
  output logic [15:0] reload_data,
  output logic        busy
);
  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_DATA} state_e;
  state_e state;
  logic [7:0] k;

  assign rd_addr = base + 9'(k >> 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      k            <= '0;
      reload_valid <= 1'b0;
      reload_last  <= 1'b0;
      reload_data  <= '0;
    end else begin
      reload_valid <= 1'b0;
      reload_last  <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          k     <= 8'(TAPS - 1);
          state <= S_ADDR;
        end
        S_ADDR: state <= S_DATA;
        S_DATA: begin
          reload_valid <= 1'b1;
          reload_data  <= k[0] ? rd_data[31:16] : rd_data[15:0];
          if (k == 0) begin
            reload_last <= 1'b1;
            state       <= S_IDLE;
          end else begin
            k     <= k - 8'd1;
            state <= S_ADDR;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
