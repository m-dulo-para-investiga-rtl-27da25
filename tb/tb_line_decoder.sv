// Testbench of line_decoder: every valid half-symbol pair of each code
// must decode to its bit without a slip, and the invalid pairs named by
// the alignment rules must raise 'slip'.
module tb_line_decoder;
  import kit_pkg::*;
  line_code_e code;
  level_e e_first, e_second;
  logic bit_out, slip;
  int checks = 0, failures = 0;
  line_decoder dut (.*);

  task automatic t(input line_code_e c, input level_e f, input level_e s, input logic eb, input logic es);
    code = c; e_first = f; e_second = s; #1;
    checks++;
    if (slip !== es || (!es && bit_out !== eb)) begin
      failures++;
      $display("FAIL code %0d pair %b %b: bit %b slip %b", c, f, s, bit_out, slip);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t(LC_UNI_NRZ, LVL_POS, LVL_POS, 1, 0);   t(LC_UNI_NRZ, LVL_ZERO, LVL_ZERO, 0, 0);
    t(LC_UNI_RZ,  LVL_POS, LVL_ZERO, 1, 0);  t(LC_UNI_RZ,  LVL_ZERO, LVL_ZERO, 0, 0);
    t(LC_UNI_RZ,  LVL_ZERO, LVL_POS, 0, 1);
    t(LC_POL_NRZ, LVL_POS, LVL_POS, 1, 0);   t(LC_POL_NRZ, LVL_ZERO, LVL_ZERO, 0, 0);
    t(LC_POL_RZ,  LVL_POS, LVL_ZERO, 1, 0);  t(LC_POL_RZ,  LVL_NEG, LVL_ZERO, 0, 0);
    t(LC_POL_RZ,  LVL_ZERO, LVL_NEG, 0, 1);
    t(LC_MANCH,   LVL_POS, LVL_ZERO, 1, 0);  t(LC_MANCH,   LVL_ZERO, LVL_POS, 0, 0);
    t(LC_MANCH,   LVL_POS, LVL_POS, 0, 1);   t(LC_MANCH,   LVL_ZERO, LVL_ZERO, 0, 1);
    t(LC_BIP_NRZ, LVL_POS, LVL_POS, 1, 0);   t(LC_BIP_NRZ, LVL_NEG, LVL_NEG, 1, 0);
    t(LC_BIP_NRZ, LVL_ZERO, LVL_ZERO, 0, 0);
    t(LC_BIP_RZ,  LVL_NEG, LVL_ZERO, 1, 0);  t(LC_BIP_RZ,  LVL_ZERO, LVL_ZERO, 0, 0);
    t(LC_BIP_RZ,  LVL_ZERO, LVL_POS, 0, 1);
    t(LC_CMI,     LVL_ZERO, LVL_POS, 0, 0);  t(LC_CMI,     LVL_POS, LVL_POS, 1, 0);
    t(LC_CMI,     LVL_ZERO, LVL_ZERO, 1, 0); t(LC_CMI,     LVL_POS, LVL_ZERO, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
