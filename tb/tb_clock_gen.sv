// Testbench of clock_gen: with 5 system clocks per sample and 8 samples
// per symbol, the sample tick must come every 5 clocks, the symbol tick
// every 40 with smp_idx = 0, the half-symbol tick at smp_idx = 4, two FIFO
// ticks per sample, and nothing while 'run' is low.
module tb_clock_gen;
  logic clk = 0, rst = 1, reset_clk = 0, run = 1;
  logic [31:0] clk_div = 32'd5;
  logic [7:0] sf = 8'd8, smp_idx;
  logic fifo_tick, smp_tick, sym_tick, half_tick;
  int checks = 0, failures = 0;
  clock_gen dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc = 0, last_smp = -1, last_sym = -1, nfifo = 0, nsmp = 0, nsym = 0, nhalf = 0;
    @(posedge clk); #1 rst = 0;
    for (int c = 0; c < 400; c++) begin
      @(posedge clk); #1; cyc++;
      if (fifo_tick) nfifo++;
      if (smp_tick) begin
        nsmp++;
        if (last_smp >= 0) check(cyc - last_smp == 5, "sample period");
        last_smp = cyc;
      end
      if (sym_tick) begin
        nsym++;
        check(smp_tick && smp_idx == 0, "symbol tick at index 0");
        if (last_sym >= 0) check(cyc - last_sym == 40, "symbol period");
        last_sym = cyc;
      end
      if (half_tick) begin nhalf++; check(smp_idx == 4, "half tick at index 4"); end
    end
    check(nsmp == 80 && nsym == 10 && nhalf == 10, $sformatf("counts %0d %0d %0d", nsmp, nsym, nhalf));
    check(nfifo == 2 * nsmp, "two FIFO ticks per sample");
    run = 0;
    begin
      int any = 0;
      for (int c = 0; c < 50; c++) begin @(posedge clk); #1; if (smp_tick || fifo_tick) any++; end
      check(any == 0, "stalled while run = 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
