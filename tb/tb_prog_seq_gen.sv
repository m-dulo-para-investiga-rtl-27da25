// Testbench of prog_seq_gen: n = 3 with seed 5 must give 5, 6, 3, 5, ...;
// n = 15 with seed 31744 (five ones then ten zeros) must rotate right with
// period 15, each step checked against an independent rotation.
module tb_prog_seq_gen;
  logic clk = 0, rst = 1, en = 0, load = 0;
  logic [4:0] ncells;
  logic [31:0] seed, state;
  int checks = 0, failures = 0;
  prog_seq_gen dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp3[4] = '{5, 6, 3, 5};
    logic [14:0] r;
    ncells = 5'd3; seed = 32'd5;
    @(posedge clk); #1 rst = 0; load = 1;
    @(posedge clk); #1 load = 0; en = 1;
    for (int k = 0; k < 4; k++) begin
      check(state == 32'(exp3[k]), $sformatf("n=3 step %0d got %0d", k, state));
      @(posedge clk); #1;
    end
    en = 0; ncells = 5'd15; seed = 32'd31744; load = 1;
    @(posedge clk); #1 load = 0; en = 1;
    r = 15'd31744;
    for (int k = 0; k < 31; k++) begin
      check(state == 32'(r), $sformatf("n=15 step %0d", k));
      r = {r[0], r[14:1]};
      @(posedge clk); #1;
    end
    en = 0;
    check(state == {17'd0, r}, "n=15 after 31 steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
