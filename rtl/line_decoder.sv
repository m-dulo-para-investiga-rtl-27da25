// Line decoder: recovers the data bit of one symbol from the decisions of
// its first half (e_first) and second half (e_second), for the eight line
// codes of line_coder. Two-level codes are decided as +V / 0, so for polar
// NRZ, Manchester and CMI the level 0 stands for -V.
//
// 'slip' flags a pair that the code cannot produce, which means the
// receiver has taken a first half for a second half: an RZ code with a
// non-zero second half, Manchester halves that are equal, or the CMI pair
// (+V, -V). NRZ codes never slip. Purely combinational.
module line_decoder
  import kit_pkg::*;
(
  input  line_code_e code,
  input  level_e     e_first,
  input  level_e     e_second,
  output logic       bit_out,
  output logic       slip
);
  always_comb begin
    bit_out = (e_first == LVL_POS);
    slip    = 1'b0;
    unique case (code)
      LC_UNI_NRZ, LC_POL_NRZ: ;
      LC_UNI_RZ, LC_POL_RZ:   slip = (e_second != LVL_ZERO);
      LC_MANCH:               slip = (e_first == e_second);
      LC_BIP_NRZ:             bit_out = (e_first != LVL_ZERO);
      LC_BIP_RZ: begin
        bit_out = (e_first != LVL_ZERO);
        slip    = (e_second != LVL_ZERO);
      end
      LC_CMI: begin
        bit_out = (e_first == e_second);
        slip    = (e_first == LVL_POS) && (e_second != LVL_POS);
      end
      default: ;
    endcase
  end
endmodule
