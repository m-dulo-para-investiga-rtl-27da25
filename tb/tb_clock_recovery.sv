// Testbench of clock_recovery (SF = 8, memory 8, phase 1).
//  - A level stream with a change every 4 samples (ideal half symbols) must
//    keep the limit c4 at SF/2-1 = 3 and give one sampling instant per half
//    symbol, 'phase' samples after each edge.
//  - Edges every 5 samples measure 4 (clamped to SF/2): once the memory has
//    filled, c4 must be 4; edges every 10 samples (two half symbols)
//    must measure the same.
//  - A long run without edges must keep sampling every c4+1 samples.
module tb_clock_recovery;
  import kit_pkg::*;
  logic clk = 0, rst = 1, smp_tick = 0;
  level_e b = LVL_ZERO;
  logic [7:0] sf = 8'd8, phase = 8'd1;
  logic [2:0] mem_log2 = 3'd3;
  logic c1, smp_now;
  logic [7:0] c2, c3, c4;
  int checks = 0, failures = 0;
  clock_recovery dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one sample; returns whether it was a sampling instant
  task automatic tick(input level_e lv, output logic s);
    b = lv; smp_tick = 1; #1;
    s = smp_now;
    @(posedge clk); #1 smp_tick = 0;
    @(posedge clk); #1;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic s;
    level_e lv = LVL_POS;
    int since_edge, nsmp;
    @(posedge clk); #1 rst = 0;
    // ideal half symbols of 4 samples
    nsmp = 0;
    for (int n = 0; n < 160; n++) begin
      if (n % 4 == 0) lv = (lv == LVL_POS) ? LVL_ZERO : LVL_POS;
      tick(lv, s);
      if (n >= 8) begin
        check(s == (n % 4 == 1), $sformatf("ideal: sample instant at n=%0d", n));
        check(c4 == 8'd3, "ideal: limit 3");
      end
      if (s) nsmp++;
    end
    check(nsmp == 40, "ideal: one instant per half symbol");
    check(c3 == 8'd3, "ideal: stored count 3");
    // slow edges: every 5 samples
    for (int n = 0; n < 100; n++) begin
      if (n % 5 == 0) lv = (lv == LVL_POS) ? LVL_ZERO : LVL_POS;
      tick(lv, s);
    end
    check(c3 == 8'd4 && c4 == 8'd4, $sformatf("slow: c3=%0d c4=%0d", c3, c4));
    for (int n = 0; n < 100; n++) begin
      if (n % 10 == 0) lv = (lv == LVL_POS) ? LVL_ZERO : LVL_POS;
      tick(lv, s);
    end
    check(c3 == 8'd4 && c4 == 8'd4, "edges two half symbols apart measure the same");
    // no edges: free running every c4+1 = 5 samples
    since_edge = 0; nsmp = 0;
    for (int n = 0; n < 50; n++) begin
      tick(lv, s);
      if (s) nsmp++;
    end
    check(nsmp == 10, $sformatf("free run instants %0d", nsmp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
