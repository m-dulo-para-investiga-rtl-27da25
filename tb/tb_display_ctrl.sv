// Testbench of display_ctrl (STOP shortened to 20): IDLE after the
// asynchronous reset with update low; a change of the text moves to
// START_COUNT, update stays high for STOP+1 clocks while the lines take
// the new text, then the machine rests until the next change.
module tb_display_ctrl;
  localparam int unsigned STOP = 20;
  logic clk = 0, rst_n = 0, update;
  logic [511:0] line_tmp = '0, line;
  int checks = 0, failures = 0;
  display_ctrl #(.LINES(4), .CHARS(16), .STOP(STOP)) dut (.*);
  always #5 clk = ~clk;

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
    #12 rst_n = 1;
    repeat (5) @(posedge clk);
    #1 check(!update && line == '0, "idle after reset");
    for (int n = 0; n < 6; n++) begin
      automatic int high = 0;
      for (int w = 0; w < 16; w++) line_tmp[w*32 +: 32] = $urandom;
      for (int c = 0; c < 3 * STOP; c++) begin
        @(posedge clk); #1;
        if (update) high++;
      end
      check(high == STOP + 1, $sformatf("update high %0d clocks", high));
      check(line == line_tmp, "lines copied");
    end
    // asynchronous reset in the middle of a refresh
    line_tmp = ~line_tmp;
    repeat (3) @(posedge clk);
    #2 rst_n = 0; #1;
    check(!update && line == '0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
