// Testbench of line_coder: for each of the eight codes, a random bit
// stream is coded with 8 samples per symbol and every output sample is
// compared with a reference written from the code definitions (first and
// second half levels, mark alternation for AMI and CMI). A last run checks
// the variable duty cycle of unipolar RZ (25 % of 8 samples = 2 samples).
module tb_line_coder;
  import kit_pkg::*;
  logic clk = 0, rst = 1, smp_tick = 0, duty_en = 0, din = 0;
  logic [7:0] smp_idx = 0, sf = 8'd8, duty = 8'd50;
  line_code_e code;
  level_e lc_out;
  logic lc_first;
  int checks = 0, failures = 0;
  line_coder dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic level_e ref_level(line_code_e c, logic b, logic second, logic alt);
    level_e m = alt ? LVL_NEG : LVL_POS;
    case (c)
      LC_UNI_NRZ: return b ? LVL_POS : LVL_ZERO;
      LC_UNI_RZ:  return (b && !second) ? LVL_POS : LVL_ZERO;
      LC_POL_NRZ: return b ? LVL_POS : LVL_NEG;
      LC_POL_RZ:  return second ? LVL_ZERO : (b ? LVL_POS : LVL_NEG);
      LC_MANCH:   return (b ^ second) ? LVL_POS : LVL_NEG;
      LC_BIP_NRZ: return b ? m : LVL_ZERO;
      LC_BIP_RZ:  return (b && !second) ? m : LVL_ZERO;
      default:    return b ? m : (second ? LVL_POS : LVL_NEG);   // CMI
    endcase
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_code(input line_code_e c, input int nsym, input logic use_duty);
    logic alt = 0;
    code = c; duty_en = use_duty; duty = 8'd25;
    rst = 1; @(posedge clk); #1 rst = 0;
    for (int s = 0; s < nsym; s++) begin
      logic b = 1'($urandom);
      din = b;
      for (int i = 0; i < 8; i++) begin
        level_e e;
        logic second;
        smp_idx = 8'(i); smp_tick = 1;
        @(posedge clk); #1 smp_tick = 0;
        second = use_duty ? (i * 100 >= 25 * 8) : (i >= 4);
        e = ref_level(c, b, second, alt);
        check(lc_out == e, $sformatf("code %0d sym %0d smp %0d got %b exp %b", c, s, i, lc_out, e));
        check(lc_first == (i == 0), "lc_first");
        @(posedge clk); #1;
      end
      if (b && (c == LC_BIP_NRZ || c == LC_BIP_RZ || c == LC_CMI)) alt = ~alt;
    end
  endtask

  initial begin
    for (int c = 0; c < 8; c++) run_code(line_code_e'(c), 40, 1'b0);
    run_code(LC_UNI_RZ, 20, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
