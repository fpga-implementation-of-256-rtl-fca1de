// aes_inv_sub_bytes: the InvSubBytes transformation of the inverse cipher.
//
// Each of the 16 state bytes goes through its own copy of the inverse S-box
// (aes_inv_sbox) in parallel. It undoes aes_sub_bytes byte for byte.
// No clock; output follows input.
module aes_inv_sub_bytes (
  input  logic [127:0] state_in,
  output logic [127:0] state_out
);

  for (genvar i = 0; i < 16; i++) begin : g_byte
    aes_inv_sbox u_inv_sbox (
      .in  (state_in [127-8*i -: 8]),
      .out (state_out[127-8*i -: 8])
    );
  end

endmodule
