// Bit sequence generator: the PRBS generator and the programmed cyclic
// generator run side by side from the same length and seed, and 'sel'
// chooses which one leaves the block. Both advance on the symbol tick and
// both reload the seed on 'reset_seed'.
//
// Outputs are registered words of the chosen generator; 'bit_out' is its
// least significant bit, the bit sent down the chain, and 'seed_det' pulses
// for one symbol when the chosen generator is back at its seed value.
module seq_gen #(
  parameter int unsigned N_MAX = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             sym_en,
  input  logic             reset_seed,
  input  logic             sel,        // 1: PRBS, 0: programmed sequence
  input  logic [4:0]       ncells,
  input  logic [N_MAX-1:0] seed,
  output logic [N_MAX-1:0] word,
  output logic             bit_out,
  output logic             seed_det
);
  logic [N_MAX-1:0] prbs_w, prog_w;

  prbs_gen #(.N_MAX(N_MAX)) u_prbs (
    .clk, .rst, .en(sym_en), .load(reset_seed), .ncells, .seed, .state(prbs_w));
  prog_seq_gen #(.N_MAX(N_MAX)) u_prog (
    .clk, .rst, .en(sym_en), .load(reset_seed), .ncells, .seed, .state(prog_w));

  assign word     = sel ? prbs_w : prog_w;
  assign bit_out  = word[0];
  assign seed_det = (word == seed);
endmodule
