// Testbench of coef_loader: a RAM model holds 12 words of coefficient
// pairs; after 'start' the loader must emit b_22 .. b_0 in that order,
// reload_last with b_0 only, two cycles per coefficient.
module tb_coef_loader;
  logic clk = 0, rst = 1, start = 0;
  logic [8:0] base = 9'd194, rd_addr;
  logic [31:0] rd_data;
  logic reload_valid, reload_last, busy;
  logic [15:0] reload_data;
  logic [31:0] ram [512];
  int checks = 0, failures = 0;
  coef_loader dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) rd_data <= ram[rd_addr];

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
    int k = 22, cyc = 0, first_cyc = -1, last_cyc = -1;
    for (int a = 0; a < 512; a++) ram[a] = 32'hDEAD_BEEF;
    for (int j = 0; j < 12; j++) ram[194 + j] = {16'(1000 + 2*j + 1), 16'(1000 + 2*j)};
    @(posedge clk); #1 rst = 0; start = 1;
    @(posedge clk); #1 start = 0;
    while (busy || reload_valid) begin
      if (reload_valid) begin
        if (first_cyc < 0) first_cyc = cyc;
        last_cyc = cyc;
        check(reload_data == 16'(1000 + k), $sformatf("coef %0d got %0d", k, reload_data));
        check(reload_last == (k == 0), "last flag");
        k--;
      end
      @(posedge clk); #1; cyc++;
      if (cyc > 200) break;
    end
    check(k == -1, "23 coefficients sent");
    check(last_cyc - first_cyc == 44, $sformatf("two cycles per coefficient (%0d)", last_cyc - first_cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
