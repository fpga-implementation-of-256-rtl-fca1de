// aes_round: datapath of one AES encryption round, split into two stages.
//
// The encryption engine runs each round in two clock cycles through this
// block. Stage A computes ShiftRows(SubBytes(state)); stage B computes
// MixColumns(state) ^ round_key, or, when last is high (the final round),
// state ^ round_key without MixColumns. Both results are offered at once
// from the same state input and the engine picks the one its current phase
// needs. Combinational; 16 S-boxes and one MixColumns. The round order
// follows the standard cipher; splitting it after ShiftRows is this design's
// choice, made so that a round takes two cycles.
module aes_round (
  input  logic [127:0] state_in,
  input  logic [127:0] round_key,
  input  logic         last,
  output logic [127:0] sub_shift_out,
  output logic [127:0] mix_key_out
);

  logic [127:0] sb, mc, mix_sel;

  aes_sub_bytes   u_sub   (.state_in(state_in), .state_out(sb));
  aes_shift_rows  u_shift (.state_in(sb),       .state_out(sub_shift_out));
  aes_mix_columns u_mix   (.state_in(state_in), .state_out(mc));

  // The final round leaves out MixColumns.
  assign mix_sel = last ? state_in : mc;

  aes_add_round_key u_ark (.state_in(mix_sel), .round_key(round_key), .state_out(mix_key_out));

endmodule
