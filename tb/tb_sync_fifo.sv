// Testbench of sync_fifo at a small depth: random writes and reads are
// compared with a queue model (data order, valid one cycle after rd,
// count, full and empty flags, writes refused when full, reads refused
// when empty, wrap-around of the pointers).
module tb_sync_fifo;
  localparam int unsigned DEPTH = 13;
  logic clk = 0, rst = 1, wr = 0, rd = 0, valid, full, empty;
  logic [31:0] din = 0, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [31:0] q [$];
  sync_fifo #(.DEPTH(DEPTH), .W(32)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_valid = 0;
    logic [31:0] exp_data = 0;
    int nfull = 0, nempty = 0;
    @(posedge clk); #1 rst = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // phases: fill-biased, drain-biased, balanced
      automatic int bias = (cyc / 500) % 3;
      wr  = ($urandom % 4) < (bias == 0 ? 3 : bias == 1 ? 1 : 2);
      rd  = ($urandom % 4) < (bias == 0 ? 1 : bias == 1 ? 3 : 2);
      din = $urandom;
      check(count == $bits(count)'(q.size()), $sformatf("count %0d vs %0d", count, q.size()));
      check(full == (q.size() == DEPTH) && empty == (q.size() == 0), "flags");
      if (full) nfull++;
      if (empty) nempty++;
      begin
        automatic int pre = q.size();
        exp_valid = rd && pre > 0;
        if (exp_valid) exp_data = q.pop_front();
        if (wr && pre < DEPTH) q.push_back(din);
      end
      @(posedge clk);
      #1;
      check(valid == exp_valid, "valid timing");
      if (valid && exp_valid) check(dout == exp_data, $sformatf("data %h vs %h", dout, exp_data));
    end
    check(nfull > 0 && nempty > 0, "full and empty both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
