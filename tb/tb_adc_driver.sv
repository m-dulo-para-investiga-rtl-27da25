// Testbench of adc_driver with two ADC chip models fed random codes: each
// conversion must return both codes, 'done' must come every 17 serial
// clocks (68 system clocks at DIV 4) when converting back to back, and
// nCS must be low for exactly 16 serial clocks per conversion.
module tb_adc_driver;
  localparam int unsigned DIV = 4;
  logic clk = 0, rst = 1, start = 0;
  logic sdata1, sdata2, sclk, ncs, done;
  logic [11:0] data1, data2, vin1 = 0, vin2 = 0;
  logic [11:0] exp1, exp2;
  int n1, n2;
  int checks = 0, failures = 0;
  adc_driver #(.DIV(DIV)) dut (.*);
  adc_chip_model chip1 (.sclk, .ncs, .vin(vin1), .sdata(sdata1), .nconv(n1));
  adc_chip_model chip2 (.sclk, .ncs, .vin(vin2), .sdata(sdata2), .nconv(n2));
  always #10 clk = ~clk;

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

  // the chips sample at the falling nCS; remember what they took
  logic [23:0] taken [$];
  int lows [$];
  int lowcnt = 0;
  always @(negedge ncs) taken.push_back({vin1, vin2});
  always @(posedge clk) if (!ncs) lowcnt++;
  always @(posedge ncs) begin lows.push_back(lowcnt); lowcnt = 0; end

  initial begin
    int t_prev = -1, cyc = 0;
    @(posedge clk); #1 rst = 0;
    start = 1;
    for (int n = 0; n < 60; n++) begin
      vin1 = 12'($urandom); vin2 = 12'($urandom);
      while (!done) begin
        @(posedge clk); #1; cyc++;
        if (n % 7 == 3) begin vin1 = 12'($urandom); vin2 = 12'($urandom); end
      end
      {exp1, exp2} = taken.pop_front();
      check(data1 == exp1 && data2 == exp2, $sformatf("codes %h/%h vs %h/%h", data1, data2, exp1, exp2));
      check(lows.pop_front() == 16 * DIV, "nCS low 16 serial clocks");
      if (t_prev >= 0) check(cyc - t_prev == 17 * DIV, $sformatf("conversion period %0d", cyc - t_prev));
      t_prev = cyc;
      @(posedge clk); #1; cyc++;
    end
    check(n1 == n2 && n1 >= 60, "conversions counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
