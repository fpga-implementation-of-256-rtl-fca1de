// aes_g_function: the g function of the AES key schedule.
//
// With use_rot = 1 the input word B0 B1 B2 B3 (B0 = bits [31:24]) is
// rotated one byte to the left to B1 B2 B3 B0, every byte goes through the
// S-box, and the round constant RC_j is XORed into the first byte (the word
// RC_j 00 00 00). With use_rot = 0 only the S-box step is applied and no
// constant is added: the extra SubWord a 256-bit key schedule applies in
// the middle of each eight-word block. Four S-box copies; combinational.
module aes_g_function
  import aes_pkg::*;
(
  input  logic [31:0] w,
  input  logic [7:0]  rcon,
  input  logic        use_rot,
  output logic [31:0] w_out
);

  word_t rotated, substituted;

  assign rotated = use_rot ? {w[23:0], w[31:24]} : w;

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    aes_sbox u_sbox (
      .in  (rotated    [31-8*i -: 8]),
      .out (substituted[31-8*i -: 8])
    );
  end

  assign w_out = substituted ^ {(use_rot ? rcon : 8'h00), 24'h000000};

endmodule
