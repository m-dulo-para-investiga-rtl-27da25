// Testbench of prbs_poly_rom: a software right-shift LFSR built from the
// ROM's tap mask must have period 2^n - 1 for n = 3..16, and the masks for
// n = 14 and n = 32 must hold exactly the powers of the right-shift
// polynomials (14,13,11,9,0) and (32,31,30,29,27,25,0).
module tb_prbs_poly_rom;
  logic [4:0] ncells;
  logic [31:0] taps;
  int checks = 0, failures = 0;
  prbs_poly_rom dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 3; n <= 16; n++) begin
      logic [31:0] s, m;
      int period;
      ncells = n[4:0]; #1;
      m = taps;
      s = 32'd1; period = 0;
      do begin
        logic fb;
        fb = s[0];
        s = s >> 1;
        if (fb) s = s ^ m ^ (32'd1 << (n - 1));
        period++;
      end while (s != 32'd1 && period < (1 << n) + 1);
      check(period == (1 << n) - 1, $sformatf("n=%0d period %0d", n, period));
    end
    ncells = 5'd14; #1;
    check(taps == ((32'd1 << 12) | (32'd1 << 10) | (32'd1 << 8)), "n=14 mask");
    ncells = 5'd0; #1;
    check(taps == ((32'd1 << 30) | (32'd1 << 29) | (32'd1 << 28) | (32'd1 << 26) | (32'd1 << 24)), "n=32 mask");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
