// Testbench of seq_gen: with sel = 0 the output follows the programmed
// sequence (5, 6, 3 for n = 3, seed 5); with sel = 1 it is the PRBS, which
// for n = 3 visits all seven non-zero words once per period of 7. Also
// checks bit_out = word[0] and the seed-detect flag.
module tb_seq_gen;
  logic clk = 0, rst = 1, sym_en = 0, reset_seed = 0, sel = 0;
  logic [4:0] ncells = 5'd3;
  logic [31:0] seed = 32'd5, word;
  logic bit_out, seed_det;
  int checks = 0, failures = 0;
  seq_gen dut (.*);
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
    int exp3[3] = '{5, 6, 3};
    logic [7:0] seen;
    @(posedge clk); #1 rst = 0; reset_seed = 1;
    @(posedge clk); #1 reset_seed = 0; sym_en = 1;
    for (int k = 0; k < 6; k++) begin
      check(word == 32'(exp3[k % 3]), $sformatf("prog step %0d got %0d", k, word));
      check(bit_out == word[0], "bit_out");
      check(seed_det == (k % 3 == 0), "seed_det");
      @(posedge clk); #1;
    end
    sel = 1; sym_en = 0; reset_seed = 1;
    @(posedge clk); #1 reset_seed = 0; sym_en = 1;
    seen = '0;
    for (int k = 0; k < 7; k++) begin
      check(word != 0 && word < 8 && !seen[word[2:0]], $sformatf("prbs step %0d word %0d", k, word));
      seen[word[2:0]] = 1'b1;
      @(posedge clk); #1;
    end
    check(seen == 8'hFE, "prbs visits 1..7");
    check(word == 32'd5, "prbs period 7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
