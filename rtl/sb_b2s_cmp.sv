// Digital comparator of a binary-to-stochastic converter.
//
// Emits one stochastic bit per cycle: 1 when the binary operand 'value' is
// greater than the random number 'rnd', else 0. Over many uniformly distributed
// random numbers the fraction of ones is the operand's probability, read in
// bipolar form (all zeros = -1, all ones = +1) by the XNOR multipliers.
// Purely combinational. The operand goes to the '+' input and the RNG to the
// '-' input as drawn for the design; the strict "greater than" is this
// implementation's choice.
module sb_b2s_cmp #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] value,
  input  logic [W-1:0] rnd,
  output logic         bit_o
);
  assign bit_o = (value > rnd);
endmodule
