// Testbench of level_decision: random samples and thresholds against the
// three-level and two-level rules.
module tb_level_decision;
  import kit_pkg::*;
  sample_t x, up, lo;
  logic three;
  level_e lvl;
  int checks = 0, failures = 0;
  level_decision dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      int xi, ui, li;
      level_e e;
      xi = $urandom_range(0, 4094) - 2047;
      ui = $urandom_range(0, 1000);
      li = -$urandom_range(0, 1000);
      if (k % 10 == 0) xi = ui;          // exactly on a threshold
      if (k % 10 == 1) xi = li;
      x = 12'(xi); up = 12'(ui); lo = 12'(li); three = 1'(k);
      #1;
      e = (xi > ui) ? LVL_POS : ((three && xi < li) ? LVL_NEG : LVL_ZERO);
      checks++;
      if (lvl != e) begin failures++; $display("FAIL x=%0d up=%0d lo=%0d three=%b", xi, ui, li, three); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
