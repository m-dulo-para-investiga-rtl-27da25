// Master FPGA: transmitter and channel of the baseband kit.
//
// Chain: sequence generator (PRBS or programmed) -> line coder -> level
// and pulse shaping -> transmitter FIR -> channel FIR -> + Gaussian noise.
// All blocks run from the system clock; the symbol, sample and FIFO clocks
// are one-cycle enables from clock_gen. Every parameter comes from the
// configuration RAM (chain_regs), written by the processor through
// registers 31 (data) and 30 (address). Setting bit 0 of the filter control
// word starts the coefficient reload, transmitter filter first, then the
// channel filter, both through the RAM's read port.
//
// Outputs: the channel signal (point B) leaves on channel 1 of the chain
// DAC, to reach the slave's ADC, with the transmitted bit on channel 2. Two
// probes select any of the points A..H; in Continuous mode they drive the
// probe DAC, in Step-by-Step mode they are written to the FIFO, which the
// processor drains through 'fifo_rd'. The FIFO write flag leaves on
// 'flag_out' to gate the slave's FIFO and clock. DAC words are offset
// binary (sample + 2048).
//
// Probe points (this design's assignment): A data bit, B channel output
// with noise, C line-coded levels, D shaped pulses, E transmitter filter
// output, F channel filter output, G noise, H symbol clock.
// Status registers: 0 FIFO count, 1 {valid, empty, full, read flag},
// 2 generator word, 3 number of generator periods (seed detections),
// 4 FIFO empty, 5 DAC and filter flags, 6 half-symbol tick, 7 last unit
// Gaussian value.
module master_fpga
  import kit_pkg::*;
#(
  parameter int unsigned WORDS      = 320,
  parameter int unsigned FIFO_DEPTH = 32767,
  parameter int unsigned HI_MARK    = 32759,
  parameter int unsigned LO_MARK    = 4,
  parameter int unsigned DAC_DIV    = 2,
  parameter int unsigned DISP_STOP  = 1000
) (
  input  logic        clk,
  input  logic        rst,
  // processor register access
  input  logic        reg_we,
  input  logic [4:0]  reg_idx,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // FIFO read side
  input  logic        fifo_rd,
  output logic [31:0] fifo_rdata,
  output logic        fifo_valid,
  // FIFO write flag towards the slave
  output logic        flag_out,
  // chain DAC
  output logic        dac_sclk,
  output logic        dac_nsync,
  output logic        dac_d1,
  output logic        dac_d2,
  // probe DAC
  output logic        pdac_sclk,
  output logic        pdac_nsync,
  output logic        pdac_d1,
  output logic        pdac_d2,
  // local display
  input  logic [511:0] disp_text,
  output logic [511:0] disp_line,
  output logic         disp_update,
  // observation of chain internals
  output sample_t     tx_point [8]
);
  localparam int unsigned CNT_W = $clog2(FIFO_DEPTH + 1);

  // ---------------- configuration -------------------------------------
  logic [31:0] words [WORDS];
  logic [31:0] status [8];
  logic [8:0]  ram_addr;
  logic [31:0] ram_rdata;

  chain_regs #(.WORDS(WORDS)) u_regs (
    .clk, .rst, .reg_we, .reg_idx, .reg_wdata, .reg_rdata,
    .status, .addr(ram_addr), .rdata(ram_rdata), .words
  );

  logic [3:0]  sgctrl, filtctrl;
  logic [7:0]  sf;
  logic        step_mode;
  assign sgctrl    = words[A_SGCTRL][3:0];
  assign filtctrl  = words[A_FILTCTRL][3:0];
  assign sf        = words[A_SF][7:0];
  assign step_mode = sgctrl[3];

  // ---------------- clocks --------------------------------------------
  logic fifo_tick, smp_tick, sym_tick, half_tick, wr_flag;
  logic [7:0] smp_idx;

  clock_gen u_clk (
    .clk, .rst, .reset_clk(sgctrl[0]), .run(step_mode ? wr_flag : 1'b1),
    .clk_div(words[A_CLKDIV]), .sf,
    .fifo_tick, .smp_tick, .sym_tick, .half_tick, .smp_idx
  );

  // ---------------- transmitter ---------------------------------------
  logic [31:0] sg_word;
  logic        sg_bit, seed_det;

  seq_gen u_seq (
    .clk, .rst, .sym_en(sym_tick), .reset_seed(sgctrl[1]), .sel(sgctrl[2]),
    .ncells(words[A_NCELLS][4:0]), .seed(words[A_SEED]),
    .word(sg_word), .bit_out(sg_bit), .seed_det
  );

  level_e  lc;
  logic    lc_first;
  sample_t shaped, tx_out, ch_out, noise, chan;

  line_coder u_lc (
    .clk, .rst, .smp_tick, .smp_idx, .sf,
    .code(line_code_e'(words[A_LCODE][2:0])),
    .duty_en(words[A_DUTY][0]), .duty(words[A_DUTY][8:1]),
    .din(sg_bit), .lc_out(lc), .lc_first
  );

  level_interp u_shape (
    .lc, .amp(words[A_AMP][11:0]), .interp(filtctrl[3]), .first(lc_first),
    .y(shaped)
  );

  // ---------------- filters and their reload --------------------------
  logic        rel_go, rel_go_q;
  logic        tx_busy, tx_busy_q, ch_busy;
  logic [8:0]  tx_addr, ch_addr;
  logic        tx_rv, tx_rl, ch_rv, ch_rl;
  logic [15:0] tx_rd, ch_rd;

  assign rel_go = filtctrl[0];
  always_ff @(posedge clk) begin
    if (rst) begin
      rel_go_q  <= 1'b0;
      tx_busy_q <= 1'b0;
    end else begin
      rel_go_q  <= rel_go;
      tx_busy_q <= tx_busy;
    end
  end

  coef_loader #(.TAPS(TAPS)) u_ld_tx (
    .clk, .rst, .start(rel_go && !rel_go_q), .base(9'(A_TXCOEF)),
    .rd_addr(tx_addr), .rd_data(ram_rdata),
    .reload_valid(tx_rv), .reload_last(tx_rl), .reload_data(tx_rd), .busy(tx_busy)
  );
  coef_loader #(.TAPS(TAPS)) u_ld_ch (
    .clk, .rst, .start(tx_busy_q && !tx_busy), .base(9'(A_CHCOEF)),
    .rd_addr(ch_addr), .rd_data(ram_rdata),
    .reload_valid(ch_rv), .reload_last(ch_rl), .reload_data(ch_rd), .busy(ch_busy)
  );
  assign ram_addr = ch_busy ? ch_addr : tx_addr;

  logic tx_ready, ch_ready;
  fir_filter #(.TAPS(TAPS), .DW(DW), .CW(CW)) u_fir_tx (
    .clk, .rst, .en(smp_tick), .bypass(!filtctrl[1]), .din(shaped), .dout(tx_out),
    .reload_valid(tx_rv), .reload_last(tx_rl), .reload_data(tx_rd),
    .reload_ready(tx_ready)
  );
  fir_filter #(.TAPS(TAPS), .DW(DW), .CW(CW)) u_fir_ch (
    .clk, .rst, .en(smp_tick), .bypass(!filtctrl[2]), .din(tx_out), .dout(ch_out),
    .reload_valid(ch_rv), .reload_last(ch_rl), .reload_data(ch_rd),
    .reload_ready(ch_ready)
  );

  // ---------------- noise ---------------------------------------------
  logic signed [11:0] z;
  awgn_gen u_awgn (
    .clk, .rst, .en(smp_tick), .sd(words[A_NOISE_SD][11:0]), .z, .noise
  );
  assign chan = sat12(32'(ch_out) + (words[A_NOISE_SD][31] ? 32'(noise) : 32'sd0));

  // ---------------- probes --------------------------------------------
  sample_t pts [8];
  sample_t pr1, pr2;
  always_comb begin
    pts[0] = sg_bit ? 12'sd2047 : 12'sd0;
    pts[1] = chan;
    pts[2] = (lc == LVL_POS) ? 12'sd2047 : (lc == LVL_NEG) ? -12'sd2047 : 12'sd0;
    pts[3] = shaped;
    pts[4] = tx_out;
    pts[5] = ch_out;
    pts[6] = noise;
    pts[7] = (smp_idx < (sf >> 1)) ? 12'sd2047 : 12'sd0;
  end
  assign tx_point = pts;

  probe_mux #(.NPTS(8)) u_probe (
    .pts, .sel1(words[A_PROBE][2:0]), .sel2(words[A_PROBE][18:16]),
    .ch1(pr1), .ch2(pr2)
  );

  // ---------------- FIFO ----------------------------------------------
  logic             f_wr, f_full, f_empty;
  logic [31:0]      f_din;
  logic [CNT_W-1:0] f_count;

  fifo_ctrl #(.HI_MARK(HI_MARK), .LO_MARK(LO_MARK), .CNT_W(CNT_W)) u_fctl (
    .clk, .rst, .step_mode, .slave(1'b0), .ext_flag(1'b1),
    .smp_tick, .fifo_tick, .ch_en(words[A_FIFOEN][1:0]),
    .ch1(16'(pr1)), .ch2(16'(pr2)), .count(f_count),
    .wr(f_wr), .din(f_din), .wr_flag
  );
  sync_fifo #(.DEPTH(FIFO_DEPTH), .W(32)) u_fifo (
    .clk, .rst, .wr(f_wr), .din(f_din), .rd(fifo_rd),
    .dout(fifo_rdata), .valid(fifo_valid), .count(f_count),
    .full(f_full), .empty(f_empty)
  );
  assign flag_out = wr_flag;

  // ---------------- DACs ----------------------------------------------
  logic dac_done, pdac_done;
  dac_driver #(.DIV(DAC_DIV)) u_dac (
    .clk, .rst, .start(1'b1),
    .data1(12'(chan) ^ 12'h800), .data2(sg_bit ? 12'hFFF : 12'h000),
    .sclk(dac_sclk), .nsync(dac_nsync), .d1(dac_d1), .d2(dac_d2), .done(dac_done)
  );
  dac_driver #(.DIV(DAC_DIV)) u_pdac (
    .clk, .rst, .start(!step_mode),
    .data1(12'(pr1) ^ 12'h800), .data2(12'(pr2) ^ 12'h800),
    .sclk(pdac_sclk), .nsync(pdac_nsync), .d1(pdac_d1), .d2(pdac_d2), .done(pdac_done)
  );

  // ---------------- display -------------------------------------------
  display_ctrl #(.LINES(4), .CHARS(16), .STOP(DISP_STOP)) u_disp (
    .clk, .rst_n(!rst), .line_tmp(disp_text), .line(disp_line), .update(disp_update)
  );

  // ---------------- status --------------------------------------------
  logic [31:0] periods;
  always_ff @(posedge clk) begin
    if (rst) periods <= '0;
    else if (sym_tick && seed_det) periods <= periods + 32'd1;
  end
  always_comb begin
    status[0] = 32'(f_count);
    status[1] = {28'd0, fifo_valid, f_empty, f_full, !wr_flag};
    status[2] = sg_word;
    status[3] = periods;
    status[4] = {31'd0, f_empty};
    status[5] = {28'd0, dac_done, pdac_done, tx_ready, ch_ready};
    status[6] = 32'(half_tick);
    status[7] = 32'(z);
  end
endmodule
