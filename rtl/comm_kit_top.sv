// Top level of the baseband communication kit: the master FPGA
// (transmitter and channel) and the slave FPGA (receiver), each with its
// own system clock and reset, as on the two boards of the kit.
//
// Connections made here: the master's FIFO write flag goes to the slave on
// a dedicated line. The analog path between the master's chain DAC and the
// slave's ADC is outside the chips, so the DAC and ADC serial lines are
// ports. Each FPGA has its own processor register port (write enable,
// register number, data; read data is combinational) and FIFO read port
// (one-cycle 'rd' pulse, data with 'valid' one cycle later), where the
// embedded processor would sit. All ports are plain signals or arrays.
module comm_kit_top
  import kit_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 32767,
  parameter int unsigned HI_MARK    = 32759,
  parameter int unsigned LO_MARK    = 4,
  parameter int unsigned MEM_MAX    = 32,
  parameter int unsigned DISP_STOP  = 1000
) (
  input  logic         m_clk,
  input  logic         m_rst,
  input  logic         s_clk,
  input  logic         s_rst,
  // master processor side
  input  logic         m_reg_we,
  input  logic [4:0]   m_reg_idx,
  input  logic [31:0]  m_reg_wdata,
  output logic [31:0]  m_reg_rdata,
  input  logic         m_fifo_rd,
  output logic [31:0]  m_fifo_rdata,
  output logic         m_fifo_valid,
  input  logic [511:0] m_disp_text,
  output logic [511:0] m_disp_line,
  output logic         m_disp_update,
  // slave processor side
  input  logic         s_reg_we,
  input  logic [4:0]   s_reg_idx,
  input  logic [31:0]  s_reg_wdata,
  output logic [31:0]  s_reg_rdata,
  input  logic         s_fifo_rd,
  output logic [31:0]  s_fifo_rdata,
  output logic         s_fifo_valid,
  // master chain DAC (channel signal, transmitted bit)
  output logic         dac_sclk,
  output logic         dac_nsync,
  output logic         dac_d1,
  output logic         dac_d2,
  // slave ADC
  output logic         adc_sclk,
  output logic         adc_ncs,
  input  logic         adc_sdata1,
  input  logic         adc_sdata2,
  // probe DACs
  output logic [3:0]   m_pdac,     // {sclk, nsync, d1, d2}
  output logic [3:0]   s_pdac,
  // observation
  output logic         flag_line,
  output logic         rx_bit,
  output logic         rx_valid,
  output logic [15:0]  rx_slips,
  output sample_t      tx_point [8],
  output sample_t      rx_point [7]
);
  logic flag;
  assign flag_line = flag;

  master_fpga #(
    .FIFO_DEPTH(FIFO_DEPTH), .HI_MARK(HI_MARK), .LO_MARK(LO_MARK),
    .DISP_STOP(DISP_STOP)
  ) u_master (
    .clk(m_clk), .rst(m_rst),
    .reg_we(m_reg_we), .reg_idx(m_reg_idx), .reg_wdata(m_reg_wdata),
    .reg_rdata(m_reg_rdata),
    .fifo_rd(m_fifo_rd), .fifo_rdata(m_fifo_rdata), .fifo_valid(m_fifo_valid),
    .flag_out(flag),
    .dac_sclk, .dac_nsync, .dac_d1, .dac_d2,
    .pdac_sclk(m_pdac[3]), .pdac_nsync(m_pdac[2]), .pdac_d1(m_pdac[1]), .pdac_d2(m_pdac[0]),
    .disp_text(m_disp_text), .disp_line(m_disp_line), .disp_update(m_disp_update),
    .tx_point
  );

  slave_fpga #(
    .FIFO_DEPTH(FIFO_DEPTH), .HI_MARK(HI_MARK), .LO_MARK(LO_MARK),
    .MEM_MAX(MEM_MAX)
  ) u_slave (
    .clk(s_clk), .rst(s_rst),
    .reg_we(s_reg_we), .reg_idx(s_reg_idx), .reg_wdata(s_reg_wdata),
    .reg_rdata(s_reg_rdata),
    .fifo_rd(s_fifo_rd), .fifo_rdata(s_fifo_rdata), .fifo_valid(s_fifo_valid),
    .flag_in(flag),
    .adc_sclk, .adc_ncs, .adc_sdata1, .adc_sdata2,
    .pdac_sclk(s_pdac[3]), .pdac_nsync(s_pdac[2]), .pdac_d1(s_pdac[1]), .pdac_d2(s_pdac[0]),
    .rx_bit, .rx_valid, .rx_slips, .rx_point
  );
endmodule
