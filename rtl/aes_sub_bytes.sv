// aes_sub_bytes: the SubBytes transformation of the AES round.
//
// Each of the 16 state bytes goes through its own copy of the S-box lookup
// table (aes_sbox), all in parallel, so the whole state is substituted in
// one combinational pass. Byte i is bits [127-8i -: 8] of the vectors.
// No clock; output follows input.
module aes_sub_bytes (
  input  logic [127:0] state_in,
  output logic [127:0] state_out
);

  for (genvar i = 0; i < 16; i++) begin : g_byte
    aes_sbox u_sbox (
      .in  (state_in [127-8*i -: 8]),
      .out (state_out[127-8*i -: 8])
    );
  end

endmodule
