// Line coder: turns the data bit of each symbol into a sequence of
// three-valued levels, 2-bit two's complement (01 = +V, 00 = 0, 11 = -V).
//
// Each symbol is two half-symbols. First/second half levels per code:
//   unipolar NRZ  1: +,+   0: 0,0       unipolar RZ  1: +,0   0: 0,0
//   polar NRZ     1: +,+   0: -,-       polar RZ     1: +,0   0: -,0
//   Manchester    1: +,-   0: -,+
//   bipolar NRZ   1: +,+ or -,- alternating           0: 0,0
//   bipolar RZ    1: +,0 or -,0 alternating           0: 0,0
//   CMI           1: +,+ or -,- alternating           0: -,+
// The alternation flag (bipolar/CMI mark polarity) flips on every '1' and
// starts at + after reset. For RZ codes a duty cycle can replace the
// half-symbol split: with 'duty_en', a sample is in the pulse while
// idx*100 < duty*SF.
//
// Timing: everything is registered on 'smp_tick'. On the first sample of a
// symbol (smp_idx = 0) the coder takes 'din' as the symbol's bit, so the
// output follows the generator by one symbol. 'lc_first' is high while the
// output holds the first sample of a symbol. The code table follows the
// usual definitions of these line codes; the Manchester and CMI polarities
// and the code numbering are this design's choice.
module line_coder
  import kit_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       smp_tick,
  input  logic [7:0] smp_idx,
  input  logic [7:0] sf,
  input  line_code_e code,
  input  logic       duty_en,
  input  logic [7:0] duty,       // percent
  input  logic       din,
  output level_e     lc_out,
  output logic       lc_first
);
  logic   alt;                   // polarity of the next mark: 0 = +V
  level_e first_q, second_q;     // levels of the current symbol
  level_e first_n, second_n;
  level_e mark;
  logic   start, in_first;

  assign start = (smp_idx == 8'd0);
  assign mark  = alt ? LVL_NEG : LVL_POS;

  always_comb begin
    first_n  = LVL_ZERO;
    second_n = LVL_ZERO;
    unique case (code)
      LC_UNI_NRZ: begin first_n = din ? LVL_POS : LVL_ZERO; second_n = first_n; end
      LC_UNI_RZ:  begin first_n = din ? LVL_POS : LVL_ZERO; second_n = LVL_ZERO; end
      LC_POL_NRZ: begin first_n = din ? LVL_POS : LVL_NEG;  second_n = first_n; end
      LC_POL_RZ:  begin first_n = din ? LVL_POS : LVL_NEG;  second_n = LVL_ZERO; end
      LC_MANCH:   begin first_n = din ? LVL_POS : LVL_NEG;  second_n = din ? LVL_NEG : LVL_POS; end
      LC_BIP_NRZ: begin first_n = din ? mark : LVL_ZERO;    second_n = first_n; end
      LC_BIP_RZ:  begin first_n = din ? mark : LVL_ZERO;    second_n = LVL_ZERO; end
      LC_CMI:     begin first_n = din ? mark : LVL_NEG;     second_n = din ? mark : LVL_POS; end
      default:    ;
    endcase
  end

  // Is the sample starting now in the first part of the symbol?
  always_comb begin
    if (duty_en && is_rz(code))
      in_first = (16'(smp_idx) * 16'd100) < (16'(duty) * 16'(sf));
    else
      in_first = smp_idx < (sf >> 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      alt      <= 1'b0;
      first_q  <= LVL_ZERO;
      second_q <= LVL_ZERO;
      lc_out   <= LVL_ZERO;
      lc_first <= 1'b0;
    end else if (smp_tick) begin
      lc_first <= start;
      if (start) begin
        first_q  <= first_n;
        second_q <= second_n;
        if (din && (code == LC_BIP_NRZ || code == LC_BIP_RZ || code == LC_CMI))
          alt <= ~alt;
        lc_out <= in_first ? first_n : second_n;
      end else begin
        lc_out <= in_first ? first_q : second_q;
      end
    end
  end
endmodule
