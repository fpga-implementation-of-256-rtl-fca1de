// aes_inv_mix_columns: the InvMixColumns transformation of the inverse cipher.
//
// Every column of the state is multiplied over GF(2^8) by the inverse of the
// MixColumns matrix:
//   [0e 0b 0d 09]
//   [09 0e 0b 0d]
//   [0d 09 0e 0b]
//   [0b 0d 09 0e]
// Each product is built from the repeated doublings a, 2a, 4a, 8a
// (aes_pkg::gmul). Combinational, four columns in parallel.
module aes_inv_mix_columns
  import aes_pkg::*;
(
  input  logic [127:0] state_in,
  output logic [127:0] state_out
);

  for (genvar c = 0; c < 4; c++) begin : g_col
    byte_t a0, a1, a2, a3;
    assign a0 = state_in[127-32*c    -: 8];
    assign a1 = state_in[127-32*c-8  -: 8];
    assign a2 = state_in[127-32*c-16 -: 8];
    assign a3 = state_in[127-32*c-24 -: 8];

    assign state_out[127-32*c    -: 8] = gmul(a0, 4'he) ^ gmul(a1, 4'hb) ^ gmul(a2, 4'hd) ^ gmul(a3, 4'h9);
    assign state_out[127-32*c-8  -: 8] = gmul(a0, 4'h9) ^ gmul(a1, 4'he) ^ gmul(a2, 4'hb) ^ gmul(a3, 4'hd);
    assign state_out[127-32*c-16 -: 8] = gmul(a0, 4'hd) ^ gmul(a1, 4'h9) ^ gmul(a2, 4'he) ^ gmul(a3, 4'hb);
    assign state_out[127-32*c-24 -: 8] = gmul(a0, 4'hb) ^ gmul(a1, 4'hd) ^ gmul(a2, 4'h9) ^ gmul(a3, 4'he);
  end

endmodule
