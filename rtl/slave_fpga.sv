// Slave FPGA: receiver of the baseband kit.
//
// Chain: ADC (channel signal from the master's chain DAC) -> receiver FIR
// -> data recovery (level decision, clock recovery, sampling, level
// decision, line decoding). The sample clock is produced here from the
// same configuration words as in the master (system clocks per sample,
// samples per symbol), so both chains run at the same rate. The ADC
// converts continuously; each sample tick takes its latest result,
// converted from offset binary to a signed sample. Setting bit 0 of the
// filter control word reloads the receiver filter coefficients.
//
// The master's FIFO write flag arrives on 'flag_in' (asynchronous to this
// clock, two-flop synchronizer). It gates the slave's FIFO writes, and in
// Step-by-Step mode its sample clock, so that both FIFOs hold the same
// time window.
//
// Probe points (this design's assignment): I ADC input, J receiver filter
// output, K level decision, L edge detection, M delayed (sampled) signal,
// N decided levels, O decoded data.
// Status registers: 0 FIFO count, 1 {valid, empty, full, read flag},
// 2 decoding slips, 3 decoded bit count, 4 {sample index, c3, c4, c2}, 5 flags, 6 ADC
// channel 2 and D1, 7 E2 and D2.
module slave_fpga
  import kit_pkg::*;
#(
  parameter int unsigned WORDS      = 448,
  parameter int unsigned FIFO_DEPTH = 32767,
  parameter int unsigned HI_MARK    = 32759,
  parameter int unsigned LO_MARK    = 4,
  parameter int unsigned ADC_DIV    = 4,
  parameter int unsigned DAC_DIV    = 2,
  parameter int unsigned MEM_MAX    = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        reg_we,
  input  logic [4:0]  reg_idx,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  input  logic        fifo_rd,
  output logic [31:0] fifo_rdata,
  output logic        fifo_valid,
  input  logic        flag_in,
  // ADC
  output logic        adc_sclk,
  output logic        adc_ncs,
  input  logic        adc_sdata1,
  input  logic        adc_sdata2,
  // probe DAC
  output logic        pdac_sclk,
  output logic        pdac_nsync,
  output logic        pdac_d1,
  output logic        pdac_d2,
  // recovered data
  output logic        rx_bit,
  output logic        rx_valid,
  output logic [15:0] rx_slips,
  output sample_t     rx_point [7]
);
  localparam int unsigned CNT_W = $clog2(FIFO_DEPTH + 1);

  logic [31:0] words [WORDS];
  logic [31:0] status [8];
  logic [8:0]  ram_addr;
  logic [31:0] ram_rdata;

  chain_regs #(.WORDS(WORDS)) u_regs (
    .clk, .rst, .reg_we, .reg_idx, .reg_wdata, .reg_rdata,
    .status, .addr(ram_addr), .rdata(ram_rdata), .words
  );

  logic [7:0] sf;
  logic       step_mode;
  assign sf        = words[A_SF][7:0];
  assign step_mode = words[A_SGCTRL][3];

  // ---------------- master flag ---------------------------------------
  logic flag_s1, flag_s2;
  always_ff @(posedge clk) begin
    if (rst) begin
      flag_s1 <= 1'b0;
      flag_s2 <= 1'b0;
    end else begin
      flag_s1 <= flag_in;
      flag_s2 <= flag_s1;
    end
  end

  // ---------------- clocks --------------------------------------------
  logic fifo_tick, smp_tick, sym_tick, half_tick, wr_flag;
  logic [7:0] smp_idx;
  clock_gen u_clk (
    .clk, .rst, .reset_clk(words[A_SGCTRL][0]), .run(step_mode ? wr_flag : 1'b1),
    .clk_div(words[A_CLKDIV]), .sf,
    .fifo_tick, .smp_tick, .sym_tick, .half_tick, .smp_idx
  );

  // ---------------- ADC -----------------------------------------------
  logic [11:0] adc1, adc2;
  logic        adc_done;
  sample_t     a_in;
  adc_driver #(.DIV(ADC_DIV)) u_adc (
    .clk, .rst, .start(1'b1), .sdata1(adc_sdata1), .sdata2(adc_sdata2),
    .sclk(adc_sclk), .ncs(adc_ncs), .data1(adc1), .data2(adc2), .done(adc_done)
  );
  assign a_in = sat12(32'(signed'(adc1 ^ 12'h800)));

  // ---------------- receiver filter -----------------------------------
  logic        rel_go, rel_go_q, rx_rv, rx_rl, ld_busy, rx_ready;
  logic [15:0] rx_rd;
  sample_t     a_flt;
  assign rel_go = words[A_FILTCTRL][0];
  always_ff @(posedge clk) begin
    if (rst) rel_go_q <= 1'b0;
    else     rel_go_q <= rel_go;
  end
  coef_loader #(.TAPS(TAPS)) u_ld_rx (
    .clk, .rst, .start(rel_go && !rel_go_q), .base(9'(A_RXCOEF)),
    .rd_addr(ram_addr), .rd_data(ram_rdata),
    .reload_valid(rx_rv), .reload_last(rx_rl), .reload_data(rx_rd), .busy(ld_busy)
  );
  fir_filter #(.TAPS(TAPS), .DW(DW), .CW(CW)) u_fir_rx (
    .clk, .rst, .en(smp_tick), .bypass(!words[A_FILTCTRL][1]), .din(a_in), .dout(a_flt),
    .reload_valid(rx_rv), .reload_last(rx_rl), .reload_data(rx_rd),
    .reload_ready(rx_ready)
  );

  // ---------------- data recovery -------------------------------------
  level_e     b, e1, e2;
  logic       c1, d3, d4_clk, f_bit, bit_valid;
  logic [7:0] c2, c3, c4;
  sample_t    d1, d2, d5;
  logic [15:0] slips;
  data_recover #(.MEM_MAX(MEM_MAX)) u_rec (
    .clk, .rst, .smp_tick, .a(a_flt), .code(line_code_e'(words[A_LCODE][2:0])), .sf,
    .up(sample_t'(words[A_RX_UP][11:0])), .lo(sample_t'(words[A_RX_LO][11:0])),
    .mem_log2(words[A_RX_MEM][2:0]), .phase(words[A_RX_PHASE][7:0]),
    .b, .c1, .c2, .c3, .c4, .d1, .d2, .d3, .d5, .e1, .e2, .d4_clk,
    .f_bit, .bit_valid, .slips
  );
  assign rx_bit   = f_bit;
  assign rx_valid = bit_valid;
  assign rx_slips = slips;

  // ---------------- probes --------------------------------------------
  function automatic sample_t lvl2s(level_e l);
    return (l == LVL_POS) ? 12'sd2047 : (l == LVL_NEG) ? -12'sd2047 : 12'sd0;
  endfunction
  sample_t pts [7];
  sample_t pr1, pr2;
  always_comb begin
    pts[0] = a_in;
    pts[1] = a_flt;
    pts[2] = lvl2s(b);
    pts[3] = c1 ? 12'sd2047 : 12'sd0;
    pts[4] = d5;
    pts[5] = lvl2s(e1);
    pts[6] = f_bit ? 12'sd2047 : 12'sd0;
  end
  assign rx_point = pts;
  probe_mux #(.NPTS(7)) u_probe (
    .pts, .sel1(words[A_PROBE][2:0]), .sel2(words[A_PROBE][18:16]),
    .ch1(pr1), .ch2(pr2)
  );

  // ---------------- FIFO ----------------------------------------------
  logic             f_wr, f_full, f_empty;
  logic [31:0]      f_din;
  logic [CNT_W-1:0] f_count;
  fifo_ctrl #(.HI_MARK(HI_MARK), .LO_MARK(LO_MARK), .CNT_W(CNT_W)) u_fctl (
    .clk, .rst, .step_mode, .slave(1'b1), .ext_flag(flag_s2),
    .smp_tick, .fifo_tick, .ch_en(words[A_FIFOEN][1:0]),
    .ch1(16'(pr1)), .ch2(16'(pr2)), .count(f_count),
    .wr(f_wr), .din(f_din), .wr_flag
  );
  sync_fifo #(.DEPTH(FIFO_DEPTH), .W(32)) u_fifo (
    .clk, .rst, .wr(f_wr), .din(f_din), .rd(fifo_rd),
    .dout(fifo_rdata), .valid(fifo_valid), .count(f_count),
    .full(f_full), .empty(f_empty)
  );

  // ---------------- probe DAC -----------------------------------------
  logic pdac_done;
  dac_driver #(.DIV(DAC_DIV)) u_pdac (
    .clk, .rst, .start(!step_mode),
    .data1(12'(pr1) ^ 12'h800), .data2(12'(pr2) ^ 12'h800),
    .sclk(pdac_sclk), .nsync(pdac_nsync), .d1(pdac_d1), .d2(pdac_d2), .done(pdac_done)
  );

  // ---------------- status --------------------------------------------
  logic [31:0] nbits;
  always_ff @(posedge clk) begin
    if (rst) nbits <= '0;
    else if (bit_valid) nbits <= nbits + 32'd1;
  end
  always_comb begin
    status[0] = 32'(f_count);
    status[1] = {28'd0, fifo_valid, f_empty, f_full, !wr_flag};
    status[2] = 32'(slips);
    status[3] = nbits;
    status[4] = {smp_idx, c3, c4, c2};
    status[5] = {21'd0, f_empty, adc_done, pdac_done, rx_ready, ld_busy, d4_clk, d3, sym_tick, half_tick, c1, 1'b0};
    status[6] = {adc2, 4'd0, 16'(d1)};
    status[7] = {14'd0, e2, 16'(d2)};
  end
endmodule
