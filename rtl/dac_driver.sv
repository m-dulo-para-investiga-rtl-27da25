// Serial driver of a two-channel 12-bit DAC module (two DAC121S101 chips
// sharing SCLK and nSYNC, one data line each).
//
// The serial clock is the system clock divided by DIV (50 MHz / 2 = 25
// MHz). A conversion is 16 serial clocks with nSYNC low, shifting out, MSB
// first, four zero control bits (normal operation) and the 12 data bits,
// followed by one serial clock with nSYNC high that latches the word: 17
// serial clocks per conversion, at most 25 MHz / 17 = 1.47 MHz. Data
// changes while SCLK is high and is stable at the falling edge, where the
// chip samples it. SCLK idles high.
//
// Interface: 'start' (level or pulse) begins a conversion with data1/data2
// captured at that moment; 'done' pulses for one system clock at the end.
// Holding 'start' high gives back-to-back conversions every 17*DIV clocks.
module dac_driver #(
  parameter int unsigned DIV = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [11:0] data1,
  input  logic [11:0] data2,
  output logic        sclk,
  output logic        nsync,
  output logic        d1,
  output logic        d2,
  output logic        done
);
  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_SYNC} state_e;
  state_e state;
  logic [$clog2(DIV)-1:0] cnt;
  logic [3:0]  nbit;
  logic [15:0] sr1, sr2;
  logic        period_end;

  assign period_end = (cnt == ($bits(cnt))'(DIV - 1));
  assign sclk  = (state == S_IDLE) ? 1'b1 : (cnt < ($bits(cnt))'(DIV / 2));
  assign nsync = (state != S_SHIFT);
  assign d1    = sr1[15];
  assign d2    = sr2[15];

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      cnt   <= '0;
      nbit  <= '0;
      sr1   <= '0;
      sr2   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          sr1 <= {4'b0000, data1};
          sr2 <= {4'b0000, data2};
          cnt <= '0; nbit <= '0;
          state <= S_SHIFT;
        end
        S_SHIFT: begin
          cnt <= period_end ? '0 : cnt + 1'b1;
          if (period_end) begin
            sr1 <= sr1 << 1;
            sr2 <= sr2 << 1;
            nbit <= nbit + 4'd1;
            if (nbit == 4'd15) state <= S_SYNC;
          end
        end
        S_SYNC: begin
          cnt <= period_end ? '0 : cnt + 1'b1;
          if (period_end) begin
            done <= 1'b1;
            if (start) begin
              sr1 <= {4'b0000, data1};
              sr2 <= {4'b0000, data2};
              nbit <= '0;
              state <= S_SHIFT;
            end else begin
              state <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
