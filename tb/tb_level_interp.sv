// Testbench of level_interp: +V, 0 and -V map to +A, 0 and -A; amplitudes
// above 2047 saturate; with interpolation only first samples pass.
module tb_level_interp;
  import kit_pkg::*;
  level_e lc;
  logic [11:0] amp;
  logic interp, first;
  sample_t y;
  int checks = 0, failures = 0;
  level_interp dut (.*);

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
    for (int k = 0; k < 200; k++) begin
      int a, e;
      a = $urandom_range(0, 4095);
      lc = level_e'(k % 3 == 0 ? 2'b01 : (k % 3 == 1 ? 2'b00 : 2'b11));
      amp = 12'(a); interp = 1'($urandom); first = 1'($urandom);
      #1;
      if (a > 2047) a = 2047;
      e = (lc == LVL_POS) ? a : (lc == LVL_NEG ? -a : 0);
      if (interp && !first) e = 0;
      check(int'(y) == e, $sformatf("lc %b amp %0d interp %b first %b got %0d exp %0d", lc, amp, interp, first, y, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
