// aes_inv_round: datapath of one inverse-cipher round, split into two stages.
//
// The decryption engine runs each round in two clock cycles through this
// block. Stage A computes InvSubBytes(InvShiftRows(state)); stage B computes
// InvMixColumns(state ^ round_key), or, when last is high (the final round),
// only state ^ round_key. The order InvShiftRows, InvSubBytes,
// AddRoundKey, InvMixColumns is the one of the described inverse cipher, so
// the round keys are used untransformed. Both stage results are offered at
// once; the engine picks one per phase. Combinational; 16 inverse S-boxes
// and one InvMixColumns. The split after InvSubBytes is this design's choice.
module aes_inv_round (
  input  logic [127:0] state_in,
  input  logic [127:0] round_key,
  input  logic         last,
  output logic [127:0] shift_sub_out,
  output logic [127:0] key_mix_out
);

  logic [127:0] isr, ark, imc;

  aes_inv_shift_rows  u_ishift (.state_in(state_in), .state_out(isr));
  aes_inv_sub_bytes   u_isub   (.state_in(isr),      .state_out(shift_sub_out));
  aes_add_round_key   u_ark    (.state_in(state_in), .round_key(round_key), .state_out(ark));
  aes_inv_mix_columns u_imix   (.state_in(ark),      .state_out(imc));

  // The final round leaves out InvMixColumns.
  assign key_mix_out = last ? ark : imc;

endmodule
