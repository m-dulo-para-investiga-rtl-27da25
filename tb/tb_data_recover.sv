// Testbench of data_recover: for every line code, random bits are coded by
// line_coder and mapped to +/-2047 by level_interp (8 samples per symbol),
// then received. The decoded stream must equal the transmitted one after a
// fixed delay of a few symbols, and D5 must repeat D1 SF/2+1 ticks later.
module tb_data_recover;
  import kit_pkg::*;
  logic clk = 0, rst = 1, smp_tick = 0;
  logic [7:0] smp_idx = 0, sf = 8'd8, phase = 8'd1;
  logic [2:0] mem_log2 = 3'd3;
  line_code_e code;
  level_e lc;
  logic lc_first, din = 0;
  sample_t a, up, lo;
  level_e b, e1, e2;
  logic c1, d3, d4_clk, f_bit, bit_valid;
  logic [7:0] c2, c3, c4;
  sample_t d1, d2, d5;
  logic [15:0] slips;
  int checks = 0, failures = 0;

  line_coder u_tx (.clk, .rst, .smp_tick, .smp_idx, .sf, .code, .duty_en(1'b0), .duty(8'd50),
                   .din, .lc_out(lc), .lc_first);
  level_interp u_map (.lc, .amp(12'd2047), .interp(1'b0), .first(lc_first), .y(a));
  data_recover dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      logic tx [$];
      logic rx [$];
      sample_t hist [$];
      int best, bad, n5 = 0, bad5 = 0;
      tx.delete(); rx.delete(); hist.delete();
      code = line_code_e'(c);
      up = (c == 2 || c == 4 || c == 7) ? 12'sd0 : 12'sd1000;
      lo = -12'sd1000;
      rst = 1; @(posedge clk); #1 rst = 0;
      for (int s = 0; s < 200; s++) begin
        din = 1'($urandom);
        tx.push_back(din);
        for (int i = 0; i < 8; i++) begin
          smp_idx = 8'(i); smp_tick = 1;
          @(posedge clk); #1 smp_tick = 0;
          hist.push_back(d1);
          if (hist.size() > 6) begin
            if (d5 != hist[hist.size() - 6]) bad5++;
            n5++;
            void'(hist.pop_front());
          end
          if (bit_valid) rx.push_back(f_bit);
          @(posedge clk); #1;
        end
      end
      // find the delay that aligns the streams, then require exact match
      best = -1;
      for (int d = 0; d < 6 && best < 0; d++) begin
        bad = 0;
        for (int k = 20; k < rx.size() - 1; k++)
          if (k + d >= 0 && rx[k] != tx[k - d + (200 - rx.size())]) bad++;
        if (bad == 0) best = d;
      end
      check(rx.size() > 190, $sformatf("code %0d: %0d bits recovered", c, rx.size()));
      check(best >= 0, $sformatf("code %0d: decoded stream matches", c));
      check(bad5 == 0 && n5 > 1000, $sformatf("code %0d: D5 delay (%0d bad)", c, bad5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
