// aes_add_round_key: the AddRoundKey transformation.
//
// Every bit of the 128-bit state is XORed with the matching bit of the
// 128-bit round key (byte i of the state with byte i of the key).
// It is its own inverse, so encryption and decryption share it.
// Combinational.
module aes_add_round_key (
  input  logic [127:0] state_in,
  input  logic [127:0] round_key,
  output logic [127:0] state_out
);

  assign state_out = state_in ^ round_key;

endmodule
