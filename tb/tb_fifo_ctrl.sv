// Testbench of fifo_ctrl with small marks (HI 10, LO 2). A counter stands
// in for the FIFO fill level; the processor model reads while the read
// flag is up. Checked: channel 1 then channel 2 each sample, sign
// extension, single-channel capture, the write flag falling above the
// high mark and rising at the low mark, no writes while it is low, none
// in Continuous mode, and the slave following the external flag.
module tb_fifo_ctrl;
  localparam int unsigned HI = 10, LO = 2;
  logic clk = 0, rst = 1, step_mode = 1, slave = 0, ext_flag = 0;
  logic smp_tick = 0, fifo_tick = 0, wr, wr_flag;
  logic [1:0] ch_en = 2'b11;
  logic [15:0] ch1 = 0, ch2 = 0;
  logic [15:0] count = 0;
  logic [31:0] din;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [31:0] got [$];
  fifo_ctrl #(.HI_MARK(HI), .LO_MARK(LO), .CNT_W(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ticks: FIFO tick every 4 cycles, sample tick on every other one
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    fifo_tick <= ((cyc + 1) % 4 == 0);
    smp_tick  <= ((cyc + 1) % 8 == 0);
  end

  task automatic run(input int n, input logic reader);
    repeat (n) begin
      @(posedge clk);
      if (wr) got.push_back(din);
      if (wr) count = count + 1;
      else if (reader && !wr_flag && count > 0) count = count - 1;
      #1;
    end
  endtask

  initial begin
    int falls = 0, rises = 0;
    logic prev;
    @(posedge clk); #1 rst = 0;
    // two-channel capture of distinct values; flag stays up below HI
    ch1 = 16'h8001; ch2 = 16'h0123;
    run(8 * 4, 0);
    check(got.size() inside {[7:8]}, $sformatf("two words per sample (%0d)", got.size()));
    for (int k = 0; k < got.size(); k++)
      check(got[k] == ((k % 2 == 0) ? 32'hFFFF_8001 : 32'h0000_0123), $sformatf("word %0d = %h", k, got[k]));
    check(wr_flag, "flag high below mark");
    // fill past HI: flag must fall once count > HI, then no writes
    run(8 * 4, 0);
    check(!wr_flag, "flag low above high mark");
    check(count == HI + 1, $sformatf("stopped right above high mark (%0d)", count));
    run(40, 0);
    check(count == HI + 1, "no write while flag low");
    // reader drains to LO, flag rises
    prev = wr_flag;
    for (int i = 0; i < 200; i++) begin
      run(1, 1);
      if (prev && !wr_flag) falls++;
      if (!prev && wr_flag) begin
        rises++;
        check(count <= LO + 1, $sformatf("rise at low mark (%0d)", count));
      end
      prev = wr_flag;
    end
    check(rises >= 1 && falls >= 1, "flag cycled");
    // single channel 2
    got.delete(); count = 0; ch_en = 2'b10; run(8 * 3, 0);
    check(got.size() inside {[2:4]} && got[0] == 32'h0000_0123 && got[1] == 32'h0000_0123, $sformatf("channel 2 only (%0d words, flag %0d)", got.size(), wr_flag));
    // continuous mode writes nothing
    got.delete(); step_mode = 0; ch_en = 2'b11; run(64, 0);
    check(got.size() == 0, "no writes in continuous mode");
    // slave follows the external flag
    step_mode = 1; slave = 1; ext_flag = 0; got.delete(); count = 20;
    run(32, 0);
    check(got.size() == 0 && !wr_flag, "slave held by external flag");
    ext_flag = 1; #1;
    check(wr_flag, "slave flag follows");
    run(32, 0);
    check(got.size() inside {[7:8]}, $sformatf("slave writes when flag up (%0d)", got.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
