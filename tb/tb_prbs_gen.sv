// Testbench of prbs_gen: for every length n = 3..18 it loads a seed, runs the
// generator and checks that the state returns to the seed after exactly
// 2^n - 1 steps without ever passing through zero or setting a cell at or
// above n (a maximum-length sequence). It also checks seed loading, the
// all-zero seed rule and that 'en' low holds the state.
module tb_prbs_gen;
  logic clk = 0, rst = 1, en = 0, load = 0;
  logic [4:0] ncells;
  logic [31:0] seed, state;
  int checks = 0, failures = 0;

  prbs_gen dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ncells = 5'd3; seed = 32'd5;
    repeat (2) @(posedge clk); #1;
    rst <= 0;
    for (int n = 3; n <= 18; n++) begin
      int steps; logic bad;
      ncells <= n[4:0]; seed <= 32'h1234_5679 & ((32'd1 << n) - 1); load <= 1;
      @(posedge clk); #1; load <= 0; en <= 1;
      @(posedge clk); #1;
      steps = 1; bad = 0;
      while (state != (32'h1234_5679 & ((32'd1 << n) - 1)) && steps < (1 << n) + 2) begin
        if (state == 0 || (state >> n) != 0) bad = 1;
        @(posedge clk); #1; steps++;
      end
      en <= 0;
      check(steps == (1 << n) - 1 && !bad, $sformatf("n=%0d period %0d", n, steps));
    end
    // n = 32: the sequence must not repeat within a short window
    ncells <= 5'd0; seed <= 32'hACE1_0001; load <= 1; @(posedge clk); #1; load <= 0; en <= 1;
    @(posedge clk); #1;
    begin
      logic rep = 0;
      for (int k = 0; k < 5000; k++) begin
        if (state == 32'hACE1_0001 || state == 0) rep = 1;
        @(posedge clk); #1;
      end
      check(!rep, "n=32 no early repeat");
    end
    en <= 0;
    // zero seed becomes 1, en low holds
    ncells <= 5'd7; seed <= 0; load <= 1; @(posedge clk); #1; load <= 0; @(posedge clk); #1;
    check(state == 32'd1, "zero seed -> 1");
    repeat (3) @(posedge clk); #1;
    check(state == 32'd1, "hold when en=0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
