// End-to-end testbench of comm_kit_top (FIFO of 256 words, marks 248/4,
// display refresh of 50 clocks). The master's chain DAC drives two DAC
// chip models; their output codes are the analog link into two ADC chip
// models read by the slave. The master and slave run on separate 50 MHz
// clocks with a phase offset.
//
// Mechanisms exercised and counted:
//  - all eight line codes recovered without errors (PRBS, 7 cells);
//  - programmed sequence generator recovered without errors;
//  - coefficient reload of the transmitter, channel and receiver filters
//    (loaded as pure delays), the transmitter output checked sample by
//    sample and the data still recovered through all three;
//  - Gaussian noise switched on, giving decision errors at low SNR;
//  - Step-by-Step mode: FIFO fill, write flag falling above the high mark,
//    both chains stalled, read-out by the processor model, flag rising at
//    the low mark and the chains resuming; slave FIFO follows the master;
//  - probe DAC conversions in Continuous mode, display refresh.
module tb_comm_kit_top;
  import kit_pkg::*;
  localparam int unsigned FD = 256, HI = 248, LO = 4;
  localparam int CLKDIV = 120, SF = 8;

  logic m_clk = 0, s_clk = 0, m_rst = 1, s_rst = 1;
  logic m_reg_we = 0, s_reg_we = 0, m_fifo_rd = 0, s_fifo_rd = 0;
  logic [4:0] m_reg_idx = 0, s_reg_idx = 0;
  logic [31:0] m_reg_wdata = 0, s_reg_wdata = 0, m_reg_rdata, s_reg_rdata;
  logic [31:0] m_fifo_rdata, s_fifo_rdata;
  logic m_fifo_valid, s_fifo_valid;
  logic [511:0] m_disp_text = '0, m_disp_line;
  logic m_disp_update;
  logic dac_sclk, dac_nsync, dac_d1, dac_d2, adc_sclk, adc_ncs, adc_sdata1, adc_sdata2;
  logic [3:0] m_pdac, s_pdac;
  logic flag_line, rx_bit, rx_valid;
  logic [15:0] rx_slips;
  sample_t tx_point [8];
  sample_t rx_point [7];

  comm_kit_top #(.FIFO_DEPTH(FD), .HI_MARK(HI), .LO_MARK(LO), .DISP_STOP(50)) dut (.*);

  // analog link: DAC chips -> ADC chips
  logic [11:0] link1, link2, pv1, pv2;
  logic [3:0] mode1, mode2, pm1, pm2;
  int nd1, nd2, na1, na2, np1, np2;
  dac_chip_model u_dac1 (.sclk(dac_sclk), .nsync(dac_nsync), .din(dac_d1), .vout(link1), .mode(mode1), .nconv(nd1));
  dac_chip_model u_dac2 (.sclk(dac_sclk), .nsync(dac_nsync), .din(dac_d2), .vout(link2), .mode(mode2), .nconv(nd2));
  adc_chip_model u_adc1 (.sclk(adc_sclk), .ncs(adc_ncs), .vin(link1), .sdata(adc_sdata1), .nconv(na1));
  adc_chip_model u_adc2 (.sclk(adc_sclk), .ncs(adc_ncs), .vin(link2), .sdata(adc_sdata2), .nconv(na2));
  dac_chip_model u_pdac1 (.sclk(m_pdac[3]), .nsync(m_pdac[2]), .din(m_pdac[1]), .vout(pv1), .mode(pm1), .nconv(np1));
  dac_chip_model u_pdac2 (.sclk(m_pdac[3]), .nsync(m_pdac[2]), .din(m_pdac[0]), .vout(pv2), .mode(pm2), .nconv(np2));

  always #10 m_clk = ~m_clk;
  initial begin #7; forever #10 s_clk = ~s_clk; end

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2_000_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- processor models --------------------------------
  task automatic mreg(input int idx, input logic [31:0] v);
    @(posedge m_clk); #1 m_reg_we = 1; m_reg_idx = 5'(idx); m_reg_wdata = v;
    @(posedge m_clk); #1 m_reg_we = 0;
  endtask
  task automatic sreg(input int idx, input logic [31:0] v);
    @(posedge s_clk); #1 s_reg_we = 1; s_reg_idx = 5'(idx); s_reg_wdata = v;
    @(posedge s_clk); #1 s_reg_we = 0;
  endtask
  task automatic mcfg(input int a, input logic [31:0] v);
    mreg(31, v); mreg(30, 32'(a));
  endtask
  task automatic scfg(input int a, input logic [31:0] v);
    sreg(31, v); sreg(30, 32'(a));
  endtask
  task automatic cfg(input int a, input logic [31:0] v);
    mcfg(a, v); scfg(a, v);
  endtask

  // ---------------- bit logs ----------------------------------------
  logic txq [$];
  logic rxq [$];
  logic logging = 0;
  always @(posedge m_clk) if (logging && dut.u_master.sym_tick) txq.push_back(dut.u_master.sg_bit);
  always @(posedge s_clk) if (logging && rx_valid) rxq.push_back(rx_bit);

  // best alignment of the last n received bits against the sent ones
  function automatic int bit_errors(int n);
    int best = n;
    if (rxq.size() < n || txq.size() < n + 64) return n;
    for (int d = 0; d < 64; d++) begin
      int e = 0;
      for (int k = 0; k < n; k++)
        if (rxq[rxq.size() - 1 - k] != txq[txq.size() - 1 - k - d]) e++;
      if (e < best) best = e;
    end
    return best;
  endfunction

  task automatic run_symbols(input int n);
    repeat (n * SF * CLKDIV) @(posedge m_clk);
  endtask

  task automatic set_code(input int code);
    int up = (code == 2 || code == 4 || code == 7) ? 0 : 700;
    cfg(A_LCODE, 32'(code));
    scfg(A_RX_UP, 32'(up));
    scfg(A_RX_LO, 32'(-700 & 12'hFFF));
  endtask

  // mechanism counters
  int n_codes_ok = 0, n_prog_ok = 0, n_reload = 0, n_filt_ok = 0, n_noise = 0;
  int n_stall = 0, n_resume = 0, n_fifo_words = 0, n_slave_words = 0, n_pdac = 0, n_disp = 0;

  initial begin
    int e;
    #100 m_rst = 0; s_rst = 0;
    // common configuration: hold clocks and generator, then release
    cfg(A_SGCTRL, 32'b0111);
    cfg(A_NCELLS, 7);
    cfg(A_SEED, 32'h5A);
    cfg(A_CLKDIV, CLKDIV);
    cfg(A_SF, SF);
    mcfg(A_AMP, 1400);
    scfg(A_RX_MEM, 3);
    scfg(A_RX_PHASE, 1);
    mcfg(A_PROBE, {13'd0, 3'd2, 13'd0, 3'd0});
    scfg(A_PROBE, {13'd0, 3'd1, 13'd0, 3'd6});
    cfg(A_FIFOEN, 3);
    set_code(2);
    cfg(A_SGCTRL, 32'b0100);          // PRBS, Continuous

    // ---- all eight line codes, no filters, no noise ----
    for (int code = 0; code < 8; code++) begin
      set_code(code);
      txq.delete(); rxq.delete(); logging = 1;
      run_symbols(260);
      logging = 0;
      e = bit_errors(150);
      check(e == 0, $sformatf("line code %0d: %0d bit errors", code, e));
      if (e == 0) n_codes_ok++;
    end

    // ---- programmed sequence ----
    set_code(2);
    cfg(A_SEED, 32'b1011001);
    cfg(A_SGCTRL, 32'b0010); cfg(A_SGCTRL, 32'b0000);
    txq.delete(); rxq.delete(); logging = 1;
    run_symbols(200);
    logging = 0;
    e = bit_errors(120);
    check(e == 0, $sformatf("programmed sequence: %0d bit errors", e));
    for (int k = rxq.size() - 100; k + 7 < rxq.size(); k++)
      check(rxq[k] == rxq[k + 7], "programmed sequence repeats every 7 bits");
    if (e == 0) n_prog_ok++;
    cfg(A_SGCTRL, 32'b0100);

    // ---- filter reload: tx = 2-sample delay, channel = 1-sample delay, rx = identity ----
    mcfg(A_TXCOEF + 1, 32'd2048);                 // b2
    mcfg(A_CHCOEF + 0, {16'd2048, 16'd0});        // b1: one more sample of delay
    scfg(A_RXCOEF + 0, 32'd2048);                 // b0
    cfg(A_FILTCTRL, 32'b0111);
    fork
      begin wait (dut.u_master.tx_busy); n_reload++; wait (dut.u_master.ch_busy); n_reload++; end
      begin wait (dut.u_slave.ld_busy); n_reload++; end
    join
    cfg(A_FILTCTRL, 32'b0110);
    run_symbols(20);
    begin
      sample_t hist [$];
      int bad = 0;
      for (int n = 0; n < 200; n++) begin
        @(posedge m_clk);
        while (!dut.u_master.smp_tick) @(posedge m_clk);
        hist.push_back(tx_point[3]);
        #1;
        if (hist.size() > 3 && tx_point[4] != hist[hist.size() - 3]) bad++;
      end
      check(bad == 0, $sformatf("transmitter filter acts as the loaded delay (%0d bad)", bad));
      if (bad == 0) n_filt_ok++;
    end
    txq.delete(); rxq.delete(); logging = 1;
    run_symbols(200);
    logging = 0;
    e = bit_errors(120);
    check(e == 0, $sformatf("filtered chain: %0d bit errors, %0d slips", e, rx_slips));
    if (e == 0) n_filt_ok++;
    cfg(A_FILTCTRL, 32'b0000);

    // ---- noise ----
    mcfg(A_NOISE_SD, 32'h8000_0000 | 32'd1400);
    txq.delete(); rxq.delete(); logging = 1;
    run_symbols(300);
    logging = 0;
    e = bit_errors(200);
    $display("noise at SNR 0 dB: %0d errors in 200 bits, %0d slips", e, rx_slips);
    check(e > 0, "noise causes decision errors");
    if (e > 0) n_noise++;
    mcfg(A_NOISE_SD, 32'd0);

    // ---- probe DAC (Continuous) ----
    check(np1 > 100 && pm1 == 0, "probe DAC converting");
    if (np1 > 100) n_pdac++;
    check(nd1 > 1000 && na1 > 1000 && mode1 == 0, "chain DAC and ADC converting");

    // ---- Step-by-Step ----
    run_symbols(20);
    cfg(A_SGCTRL, 32'b1100);
    wait (!flag_line);
    n_stall++;
    begin
      int ticks = 0;
      repeat (4 * CLKDIV) begin
        @(posedge m_clk);
        if (dut.u_master.smp_tick || dut.u_slave.smp_tick) ticks++;
      end
      check(ticks == 0, "both chains stalled while the FIFO is full");
    end
    check(dut.u_master.f_count == HI + 1, $sformatf("master FIFO stops above the high mark (%0d)", dut.u_master.f_count));
    n_slave_words = int'(dut.u_slave.f_count);
    check(n_slave_words >= HI - 3 && n_slave_words <= HI + 1,
          $sformatf("slave FIFO holds the same window (%0d words)", n_slave_words));
    // drain the master FIFO until the flag comes back; the words alternate
    // channel 1 (bit, 0 or 2047) and channel 2 (line-coded level)
    begin
      int k = 0, badw = 0;
      while (!flag_line) begin
        @(posedge m_clk); #1 m_fifo_rd = 1;
        @(posedge m_clk); #1 m_fifo_rd = 0;
        check(m_fifo_valid, "read data valid one clock after rd");
        if (k % 2 == 0 && !(m_fifo_rdata == 0 || m_fifo_rdata == 2047)) badw++;
        if (k % 2 == 1 && !(m_fifo_rdata == 0 || m_fifo_rdata == 2047 || m_fifo_rdata == 32'hFFFF_F801)) badw++;
        k++;
      end
      n_fifo_words = k;
      check(badw == 0, $sformatf("FIFO words alternate channel 1 / channel 2 (%0d bad)", badw));
      check(dut.u_master.f_count <= LO, "flag rises at the low mark");
    end
    n_resume++;
    // drain the slave FIFO: channel 1 is the decoded bit (0 or 2047)
    begin
      int badw = 0;
      for (int k = 0; k < 200; k++) begin
        @(posedge s_clk); #1 s_fifo_rd = 1;
        @(posedge s_clk); #1 s_fifo_rd = 0;
        if (k % 2 == 0 && !(s_fifo_rdata == 0 || s_fifo_rdata == 2047)) badw++;
      end
      check(badw == 0, "slave FIFO words");
    end
    begin
      int ticks = 0;
      repeat (4 * CLKDIV) begin
        @(posedge m_clk);
        if (dut.u_master.smp_tick) ticks++;
      end
      check(ticks > 0, "chain resumes after reading");
    end
    cfg(A_SGCTRL, 32'b0100);

    // ---- display ----
    m_disp_text = {16{32'h4B49_5421}};
    wait (m_disp_update);
    n_disp++;
    wait (!m_disp_update);
    check(m_disp_line == m_disp_text, "display lines refreshed");

    // ---- mechanism summary ----
    $display("codes_ok=%0d prog_ok=%0d reloads=%0d filter_ok=%0d noise=%0d stalls=%0d resumes=%0d fifo_words=%0d slave_words=%0d pdac=%0d display=%0d",
             n_codes_ok, n_prog_ok, n_reload, n_filt_ok, n_noise, n_stall, n_resume, n_fifo_words, n_slave_words, n_pdac, n_disp);
    check(n_codes_ok == 8, "all line codes recovered");
    check(n_prog_ok > 0 && n_reload == 3 && n_filt_ok == 2 && n_noise > 0, "sequence, filter and noise mechanisms seen");
    check(n_stall > 0 && n_resume > 0 && n_fifo_words > 0 && n_pdac > 0 && n_disp > 0, "FIFO, DAC and display mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
