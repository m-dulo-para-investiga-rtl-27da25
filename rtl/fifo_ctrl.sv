// Step-by-Step capture control of the FIFO.
//
// Each sample, the enabled probe channels are written to the FIFO, channel
// 1 then channel 2, in alternate positions: channel 1 on the FIFO tick that
// coincides with the sample tick, channel 2 on the next FIFO tick (half a
// sample later). Each word is the 16-bit channel value sign-extended to 32
// bits.
//
// Writing is allowed while 'wr_flag' is high. In the master, wr_flag is set
// by reset, cleared as soon as more than HI_MARK words are stored (the
// processor may then read, 'read flag' = !wr_flag) and set again when
// reading has brought the FIFO down to LO_MARK words; the two marks keep the
// FIFO away from full and empty. In the slave ('slave' high) wr_flag is
// the master's flag received on the dedicated line, so both FIFOs store the
// same samples. In Step-by-Step mode wr_flag also enables the chain clock,
// so no sample is lost while the FIFO is being read. In Continuous mode
// nothing is written.
module fifo_ctrl #(
  parameter int unsigned HI_MARK = 32759,
  parameter int unsigned LO_MARK = 4,
  parameter int unsigned CNT_W   = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             step_mode,
  input  logic             slave,
  input  logic             ext_flag,
  input  logic             smp_tick,
  input  logic             fifo_tick,
  input  logic [1:0]       ch_en,
  input  logic [15:0]      ch1,
  input  logic [15:0]      ch2,
  input  logic [CNT_W-1:0] count,
  output logic             wr,
  output logic [31:0]      din,
  output logic             wr_flag
);
  logic        own_flag;
  logic        pend2;
  logic [15:0] ch2_q;

  assign wr_flag = slave ? ext_flag : own_flag;

  always_ff @(posedge clk) begin
    if (rst)
      own_flag <= 1'b1;
    else if (own_flag && count > CNT_W'(HI_MARK))
      own_flag <= 1'b0;
    else if (!own_flag && count <= CNT_W'(LO_MARK))
      own_flag <= 1'b1;
  end

  always_comb begin
    wr  = 1'b0;
    din = '0;
    if (step_mode && wr_flag && fifo_tick) begin
      if (smp_tick && ch_en[0]) begin
        wr = 1'b1; din = {{16{ch1[15]}}, ch1};
      end else if (smp_tick && ch_en[1] && !ch_en[0]) begin
        wr = 1'b1; din = {{16{ch2[15]}}, ch2};
      end else if (!smp_tick && pend2) begin
        wr = 1'b1; din = {{16{ch2_q[15]}}, ch2_q};
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pend2 <= 1'b0;
      ch2_q <= '0;
    end else if (step_mode && wr_flag && fifo_tick) begin
      if (smp_tick) begin
        pend2 <= ch_en[0] && ch_en[1];
        ch2_q <= ch2;
      end else begin
        pend2 <= 1'b0;
      end
    end
  end
endmodule
