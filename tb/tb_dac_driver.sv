// Testbench of dac_driver with two DAC chip models: random words must
// reach both chips unchanged with zero control bits, one conversion per
// start; back-to-back conversions must be 17 serial clocks (34 system
// clocks at DIV 2) apart; SCLK must have period DIV.
module tb_dac_driver;
  localparam int unsigned DIV = 2;
  logic clk = 0, rst = 1, start = 0;
  logic [11:0] data1 = 0, data2 = 0;
  logic sclk, nsync, d1, d2, done;
  logic [11:0] v1, v2;
  logic [3:0] m1, m2;
  int n1, n2;
  int checks = 0, failures = 0;
  dac_driver #(.DIV(DIV)) dut (.*);
  dac_chip_model chip1 (.sclk, .nsync, .din(d1), .vout(v1), .mode(m1), .nconv(n1));
  dac_chip_model chip2 (.sclk, .nsync, .din(d2), .vout(v2), .mode(m2), .nconv(n2));
  always #10 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_prev = -1, cyc = 0;
    @(posedge clk); #1 rst = 0;
    // single conversions
    for (int n = 0; n < 40; n++) begin
      data1 = 12'($urandom); data2 = 12'($urandom);
      start = 1; @(posedge clk); #1 start = 0;
      data1 = ~data1;                     // must have been captured at start
      while (!done) begin @(posedge clk); #1; end
      check(v1 == ~data1 && v2 == data2, $sformatf("words %h %h", v1, v2));
      check(m1 == 0 && m2 == 0, "normal operation mode");
      check(n1 == n + 1, "one conversion per start");
      repeat ($urandom % 5) @(posedge clk);
      #1;
    end
    // back to back, rate check
    start = 1;
    repeat (400) begin
      @(posedge clk); #1; cyc++;
      if (done) begin
        if (t_prev >= 0) check(cyc - t_prev == 17 * DIV, $sformatf("conversion period %0d", cyc - t_prev));
        t_prev = cyc;
      end
    end
    check(t_prev > 0, "conversions completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
