// Testbench of probe_mux: random test-point values and selections; each
// channel must show the selected point.
module tb_probe_mux;
  import kit_pkg::*;
  sample_t pts [8];
  logic [2:0] sel1, sel2;
  sample_t ch1, ch2;
  int checks = 0, failures = 0;
  probe_mux #(.NPTS(8)) dut (.*);

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
    for (int n = 0; n < 500; n++) begin
      for (int k = 0; k < 8; k++) pts[k] = sample_t'($urandom);
      sel1 = 3'($urandom); sel2 = 3'($urandom);
      #1;
      check(ch1 == pts[sel1], "channel 1");
      check(ch2 == pts[sel2], "channel 2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
