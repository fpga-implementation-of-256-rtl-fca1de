// aes256_top: AES-256 unit with an encryption engine and a decryption engine.
//
// The two engines stand side by side, each with its own key, data, start,
// done and busy signals, so a block can be encrypted and another decrypted
// at the same time, or either engine used alone.
//   aes_encrypt: 28 cycles per 128-bit block, key schedule computed on the fly
//   aes_decrypt: 41 cycles per block, key schedule first expanded into a
//                key reversal buffer, then 14 inverse rounds
// Both use a 256-bit key (word 0 = key[255:224]) and 128-bit blocks whose
// first byte is bits [127:120]. All flops reset asynchronously on rst_n low.
// Placing both engines in one top with separate ports is this design's
// choice; the engines themselves follow the described architecture.
module aes256_top (
  input  logic         clk,
  input  logic         rst_n,
  // encryption
  input  logic         enc_start,
  input  logic [255:0] enc_key,
  input  logic [127:0] enc_plaintext,
  output logic [127:0] enc_ciphertext,
  output logic         enc_done,
  output logic         enc_busy,
  // decryption
  input  logic         dec_start,
  input  logic [255:0] dec_key,
  input  logic [127:0] dec_ciphertext,
  output logic [127:0] dec_plaintext,
  output logic         dec_done,
  output logic         dec_busy
);

  aes_encrypt u_enc (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (enc_start),
    .key        (enc_key),
    .plaintext  (enc_plaintext),
    .ciphertext (enc_ciphertext),
    .done       (enc_done),
    .busy       (enc_busy)
  );

  aes_decrypt u_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (dec_start),
    .key        (dec_key),
    .ciphertext (dec_ciphertext),
    .plaintext  (dec_plaintext),
    .done       (dec_done),
    .busy       (dec_busy)
  );

endmodule
