// Serial driver of a two-channel 12-bit ADC module (two ADCS7476 chips
// sharing SCLK and nCS, one data line each).
//
// The serial clock is the system clock divided by DIV (50 MHz / 4 = 12.5
// MHz, below the 20 MHz the chips allow). States: IDLE (nCS high) until
// 'start'; SHIFTIN, 16 serial clocks with nCS low in which each chip
// sends four leading zeros and its 12-bit result, MSB first, shifted into
// a register on each rising SCLK edge (sampled while SCLK is high, just
// before it falls and the chip moves to its next bit); SYNCDATA, one
// serial clock with nCS high that ends the conversion. 17 serial clocks per
// conversion, at most 12.5 MHz / 17 = 735 kHz. SCLK idles high.
//
// Interface: data1/data2 are updated and 'done' pulses for one system
// clock at the end of SYNCDATA. Holding 'start' high converts back to back.
module adc_driver #(
  parameter int unsigned DIV = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        sdata1,
  input  logic        sdata2,
  output logic        sclk,
  output logic        ncs,
  output logic [11:0] data1,
  output logic [11:0] data2,
  output logic        done
);
  typedef enum logic [1:0] {S_IDLE, S_SHIFTIN, S_SYNCDATA} state_e;
  state_e state;
  logic [$clog2(DIV)-1:0] cnt;
  logic [3:0]  nbit;
  logic [11:0] sh1, sh2;   // the four leading zeros fall out of the top
  logic        period_end, sample_pt;

  assign period_end = (cnt == ($bits(cnt))'(DIV - 1));
  assign sample_pt  = (cnt == ($bits(cnt))'(DIV / 2 - 1));
  assign sclk = (state == S_IDLE) ? 1'b1 : (cnt < ($bits(cnt))'(DIV / 2));
  assign ncs  = (state != S_SHIFTIN);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      cnt   <= '0;
      nbit  <= '0;
      sh1   <= '0;
      sh2   <= '0;
      data1 <= '0;
      data2 <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          sh1 <= '0;
          sh2 <= '0;
          cnt <= '0; nbit <= '0;
          state <= S_SHIFTIN;
        end
        S_SHIFTIN: begin
          cnt <= period_end ? '0 : cnt + 1'b1;
          if (sample_pt) begin
            sh1 <= {sh1[10:0], sdata1};
            sh2 <= {sh2[10:0], sdata2};
          end
          if (period_end) begin
            nbit <= nbit + 4'd1;
            if (nbit == 4'd15) state <= S_SYNCDATA;
          end
        end
        S_SYNCDATA: begin
          cnt <= period_end ? '0 : cnt + 1'b1;
          if (period_end) begin
            data1 <= sh1;
            data2 <= sh2;
            done  <= 1'b1;
            nbit  <= '0;
            state <= start ? S_SHIFTIN : S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
