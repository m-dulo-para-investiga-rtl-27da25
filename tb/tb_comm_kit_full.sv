// Full-size testbench of comm_kit_top: every parameter at its default
// (FIFO of 32767 words with marks 32759 and 4, display refresh of 1000
// clocks). One complete operation: configure both boards, send a PRBS in
// polar NRZ through the DAC/ADC link and recover it without errors, then
// switch to Step-by-Step, fill the FIFOs until the write flag falls above
// the high mark, check both chains stall, read the whole master FIFO back
// (alternating channel 1 / channel 2 words) until the flag rises at the low
// mark, and check that the chain resumes; finally refresh the display.
module tb_comm_kit_full;
  import kit_pkg::*;
  localparam int unsigned FD = 32767, HI = 32759, LO = 4;
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

  comm_kit_top dut (.*);

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
  int n_codes_ok = 0;
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

    // ---- polar NRZ through the link ----
    set_code(2);
    txq.delete(); rxq.delete(); logging = 1;
    run_symbols(300);
    logging = 0;
    e = bit_errors(200);
    check(e == 0, $sformatf("polar NRZ: %0d bit errors", e));
    if (e == 0) n_codes_ok++;

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
      for (int k = 0; k < 2000; k++) begin
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

    $display("codes_ok=%0d stalls=%0d resumes=%0d fifo_words=%0d slave_words=%0d pdac=%0d display=%0d",
             n_codes_ok, n_stall, n_resume, n_fifo_words, n_slave_words, n_pdac, n_disp);
    check(n_codes_ok == 1 && n_stall > 0 && n_resume > 0 && n_fifo_words > 30000 && n_pdac > 0 && n_disp > 0, "all mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
