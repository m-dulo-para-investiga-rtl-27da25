// Configuration RAM and processor registers of the communication chain.
//
// The processor sees 32 registers. To configure a block it writes the data
// word into register 31 and then the RAM position into register 30; the
// write to register 30 stores register 31 at that position. The RAM is
// WORDS x 32 bits (320 in the master, 448 in the slave) and every word is
// visible to the chain at all times ('words'), so each block reads its
// parameters directly; a second, synchronous read port ('addr'/'rdata',
// one cycle latency) serves the coefficient loaders. Reads of registers
// 0..7 return the chain's status words ('status'), register 31 reads back.
// All words reset to 0.
module chain_regs #(
  parameter int unsigned WORDS = 320
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        reg_we,
  input  logic [4:0]  reg_idx,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  input  logic [31:0] status [8],
  input  logic [8:0]  addr,
  output logic [31:0] rdata,
  output logic [31:0] words [WORDS]
);
  logic [31:0] data31;

  always_ff @(posedge clk) begin
    if (rst) begin
      data31 <= '0;
      for (int k = 0; k < int'(WORDS); k++) words[k] <= '0;
    end else if (reg_we) begin
      if (reg_idx == 5'd31) data31 <= reg_wdata;
      if (reg_idx == 5'd30 && 32'(reg_wdata[8:0]) < WORDS) words[reg_wdata[8:0]] <= data31;
    end
  end

  always_ff @(posedge clk) begin
    rdata <= (32'(addr) < WORDS) ? words[addr] : '0;
  end

  always_comb begin
    if (reg_idx < 5'd8)        reg_rdata = status[reg_idx[2:0]];
    else if (reg_idx == 5'd31) reg_rdata = data31;
    else                       reg_rdata = '0;
  end
endmodule
