// Feedback polynomial ROM of the PRBS generator (the 32x32 ROM).
//
// For each register length n = 3..32 it returns a 32-bit tap mask of the
// maximum-length right-shift polynomial. The powers are those of the
// right-shift primitive polynomials, each obtained from the left-shift
// polynomial by replacing every power p with n-p. A power p (0 < p < n)
// sets mask bit p-1: in prbs_gen, cell p-1 then takes the fed-back bit XORed
// into what it shifts in. The powers n and 0 are implied by the register
// length and are not stored. Lengths below 3 return the n = 3 polynomial.
//
// Purely combinational: taps follows ncells in the same cycle.
module prbs_poly_rom (
  input  logic [4:0]  ncells,   // register length n; 0 stands for 32
  output logic [31:0] taps
);
  function automatic logic [31:0] m(input int p1, input int p2 = 0, input int p3 = 0,
                                    input int p4 = 0, input int p5 = 0);
    logic [31:0] r = '0;
    if (p1 > 0) r[p1-1] = 1'b1;
    if (p2 > 0) r[p2-1] = 1'b1;
    if (p3 > 0) r[p3-1] = 1'b1;
    if (p4 > 0) r[p4-1] = 1'b1;
    if (p5 > 0) r[p5-1] = 1'b1;
    return r;
  endfunction

  always_comb begin
    unique case (ncells)
      5'd4:  taps = m(3);
      5'd5:  taps = m(3);
      5'd6:  taps = m(5);
      5'd7:  taps = m(6);
      5'd8:  taps = m(6, 5, 4);
      5'd9:  taps = m(5);
      5'd10: taps = m(7);
      5'd11: taps = m(9);
      5'd12: taps = m(11, 8, 6);
      5'd13: taps = m(12, 10, 9);
      5'd14: taps = m(13, 11, 9);
      5'd15: taps = m(14);
      5'd16: taps = m(14, 13, 11);
      5'd17: taps = m(14);
      5'd18: taps = m(17, 16, 13);
      5'd19: taps = m(18, 17, 14);
      5'd20: taps = m(17);
      5'd21: taps = m(19);
      5'd22: taps = m(21);
      5'd23: taps = m(18);
      5'd24: taps = m(23, 21, 20);
      5'd25: taps = m(22);
      5'd26: taps = m(25, 24, 20);
      5'd27: taps = m(26, 25, 22);
      5'd28: taps = m(25);
      5'd29: taps = m(27);
      5'd30: taps = m(29, 26, 24);
      5'd31: taps = m(28);
      5'd0:  taps = m(31, 30, 29, 27, 25);   // n = 32
      default: taps = m(2);                  // n = 3 (and n < 3)
    endcase
  end
endmodule
