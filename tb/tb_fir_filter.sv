// Testbench of fir_filter: loads 23 coefficients through the reload
// channel (last coefficient first), then
//  - an impulse of 1024 must return each coefficient halved (b_k*1024/2048),
//    the first one in the same enable that takes the impulse;
//  - a random input must match a reference convolution sample by sample,
//    including saturation at +/-2047;
//  - a new coefficient set must take effect only after reload_last;
//  - bypass passes the input straight through.
module tb_fir_filter;
  logic clk = 0, rst = 1, en = 0, bypass = 0;
  logic signed [11:0] din = 0, dout;
  logic reload_valid = 0, reload_last = 0, reload_ready;
  logic signed [15:0] reload_data = 0;
  int checks = 0, failures = 0;
  int c [23] = '{-3, 0, -7, 17, 20, 25, 30, 40, 53, 69, 76, 80, 83, 90, 101, 97, 71, 52, 43, 39, 27, 22, -10};
  fir_filter dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load(input int cc [23]);
    for (int k = 22; k >= 0; k--) begin
      reload_valid = 1; reload_last = (k == 0); reload_data = 16'(cc[k]);
      @(posedge clk); #1;
    end
    reload_valid = 0; reload_last = 0;
  endtask

  task automatic step(input int x);
    din = 12'(x); en = 1;
    @(posedge clk); #1 en = 0;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hist [23];
    @(posedge clk); #1 rst = 0;
    check(reload_ready, "reload_ready");
    load(c);
    for (int k = 0; k < 23; k++) begin
      step(k == 0 ? 1024 : 0);
      check(dout == 12'(c[k] >>> 1), $sformatf("impulse k=%0d got %0d exp %0d", k, dout, c[k] >>> 1));
    end
    for (int k = 0; k < 23; k++) hist[k] = 0;
    // larger coefficients so the sum saturates sometimes
    for (int k = 0; k < 23; k++) c[k] = c[k] * 8;
    load(c);
    for (int k = 0; k < 23; k++) step(0);
    for (int n = 0; n < 300; n++) begin
      int x, acc, e;
      x = $urandom_range(0, 4094) - 2047;
      for (int k = 22; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x;
      acc = 0;
      for (int k = 0; k < 23; k++) acc += hist[k] * c[k];
      e = acc >>> 11;
      if (e > 2047) e = 2047;
      if (e < -2047) e = -2047;
      step(x);
      check(int'(dout) == e, $sformatf("random n=%0d got %0d exp %0d", n, dout, e));
    end
    // partial reload has no effect until the last coefficient
    reload_valid = 1; reload_data = 16'sd2047;
    repeat (5) @(posedge clk);
    #1 reload_valid = 0;
    for (int k = 0; k < 23; k++) step(0);
    step(1024);
    check(dout == 12'(c[0] >>> 1), "partial reload ignored");
    bypass = 1; step(-77);
    check(dout == -12'sd77, "bypass");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
