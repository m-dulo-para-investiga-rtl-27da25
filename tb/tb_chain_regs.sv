// Testbench of chain_regs: random (data, address) pairs written through
// registers 31 and 30 are compared with a model RAM, on the parallel view
// and on the one-cycle read port; writes to other registers or out of
// range addresses change nothing; registers 0..7 read the status inputs.
module tb_chain_regs;
  localparam int unsigned WORDS = 320;
  logic clk = 0, rst = 1, reg_we = 0;
  logic [4:0] reg_idx = 0;
  logic [31:0] reg_wdata = 0, reg_rdata, rdata;
  logic [31:0] status [8];
  logic [8:0] addr = 0;
  logic [31:0] words [WORDS];
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;
  chain_regs #(.WORDS(WORDS)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wreg(input int idx, input logic [31:0] v);
    reg_we = 1; reg_idx = 5'(idx); reg_wdata = v;
    @(posedge clk); #1 reg_we = 0;
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) status[k] = 32'(k * 1111 + 7);
    for (int k = 0; k < WORDS; k++) model[k] = 0;
    @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 600; n++) begin
      automatic logic [31:0] d = $urandom;
      automatic int a = $urandom % 512;
      wreg(31, d);
      check(reg_rdata == d, "register 31 reads back");
      if ($urandom % 8 == 0) wreg(5 + ($urandom % 20), $urandom);   // no effect
      wreg(30, 32'(a));
      if (a < int'(WORDS)) model[a] = d;
    end
    for (int k = 0; k < WORDS; k++) check(words[k] == model[k], $sformatf("word %0d", k));
    for (int k = 0; k < WORDS; k += 7) begin
      addr = 9'(k);
      @(posedge clk); #1;
      check(rdata == model[k], $sformatf("read port %0d", k));
    end
    for (int k = 0; k < 8; k++) begin
      reg_idx = 5'(k); #1;
      check(reg_rdata == status[k], "status register");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
