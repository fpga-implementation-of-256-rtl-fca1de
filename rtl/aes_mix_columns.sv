// aes_mix_columns: the MixColumns transformation of the AES round.
//
// Every column (a0..a3) of the state is multiplied over GF(2^8) by the
// constant circulant matrix of the AES standard:
//   [02 03 01 01]
//   [01 02 03 01]
//   [01 01 02 03]
//   [03 01 01 02]
// Multiplication by 02 is a shift with a conditional XOR of 8'h1b, and by
// 03 is that result XOR the byte. The four columns are computed in
// parallel; the module is combinational.
module aes_mix_columns
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

    assign state_out[127-32*c    -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
    assign state_out[127-32*c-8  -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
    assign state_out[127-32*c-16 -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
    assign state_out[127-32*c-24 -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
  end

endmodule
