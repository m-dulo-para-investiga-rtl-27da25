// Testbench of awgn_gen and its ROM levels.
//  - ROM entries are compared with values of sqrt(2)*erfinv computed
//    independently (bisection on erfc, rounded to 1/256);
//  - 40000 generated samples must have mean ~0, variance ~1 and tail
//    fractions P(|z|>1) ~ 0.317, P(|z|>2) ~ 0.0455, P(|z|>3) ~ 0.0027,
//    and some samples must come from ROM levels 2 and beyond (|z| > 3.3);
//  - every noise output must equal z*sd/256 saturated.
module tb_awgn_gen;
  logic clk = 0, rst = 1, en = 0;
  logic [11:0] sd = 12'd1024;
  logic signed [11:0] z, noise;
  int checks = 0, failures = 0;
  awgn_gen dut (.*);
  always #5 clk = ~clk;

  logic [8:0] a1, a2, a3, a4, a5;
  logic [10:0] d1, d2, d3, d4, d5;
  awgn_rom #(.LEVEL(1)) r1 (.addr(a1), .data(d1));
  awgn_rom #(.LEVEL(2)) r2 (.addr(a2), .data(d2));
  awgn_rom #(.LEVEL(3)) r3 (.addr(a3), .data(d3));
  awgn_rom #(.LEVEL(4)) r4 (.addr(a4), .data(d4));
  awgn_rom #(.LEVEL(5)) r5 (.addr(a5), .data(d5));

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
    real sum = 0, sq = 0, m, v;
    int n1 = 0, n2 = 0, n3 = 0, ndeep = 0;
    localparam int N = 40000;
    // reference entries: level, index, value*256
    a1 = 0;   #1 check(d1 == 0,    "L1[0]");
    a1 = 100; #1 check(d1 == 64,   "L1[100]");
    a1 = 256; #1 check(d1 == 173,  "L1[256]");
    a1 = 400; #1 check(d1 == 316,  "L1[400]");
    a1 = 510; #1 check(d1 == 762,  "L1[510]");
    a2 = 0;   #1 check(d2 == 793,  "L2[0]");
    a2 = 300; #1 check(d2 == 858,  "L2[300]");
    a2 = 511; #1 check(d2 == 1219, "L2[511]");
    a3 = 5;   #1 check(d3 == 1184, "L3[5]");
    a3 = 511; #1 check(d3 == 1509, "L3[511]");
    a4 = 200; #1 check(d4 == 1501, "L4[200]");
    a5 = 0;   #1 check(d5 == 1729, "L5[0]");
    a5 = 511; #1 check(d5 == 1970, "L5[511]");
    @(posedge clk); #1 rst = 0;
    for (int k = 0; k < N; k++) begin
      real zr;
      int e;
      sd = 12'($urandom_range(0, 4095));
      en = 1; @(posedge clk); #1 en = 0;
      zr = real'(z) / 256.0;
      sum += zr; sq += zr * zr;
      if (zr > 1.0 || zr < -1.0) n1++;
      if (zr > 2.0 || zr < -2.0) n2++;
      if (zr > 3.0 || zr < -3.0) n3++;
      if (zr > 3.3 || zr < -3.3) ndeep++;
      e = (int'(z) * int'(sd)) >>> 8;
      if (e > 2047) e = 2047;
      if (e < -2047) e = -2047;
      check(int'(noise) == e, "noise scaling");
    end
    m = sum / N; v = sq / N - m * m;
    $display("mean %f var %f  |z|>1 %0d  >2 %0d  >3 %0d  >3.3 %0d", m, v, n1, n2, n3, ndeep);
    check(m < 0.03 && m > -0.03, "mean");
    check(v > 0.95 && v < 1.05, "variance");
    check(n1 > 12200 && n1 < 13200, "P(|z|>1)");
    check(n2 > 1620 && n2 < 2020, "P(|z|>2)");
    check(n3 > 60 && n3 < 160, "P(|z|>3)");
    check(ndeep > 10, "deeper ROM levels used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
